// tb_min4: checks that min4 returns the min of its three inputs, for all
// corner patterns (0, 1, 127, 128, 254, 255 in every position) and for
// random values, against a sort-free reference.
module tb_min4;
  logic [7:0] r1, r2, r3, y;
  int checks = 0, failures = 0;

  min4 #(.PIX_W(8)) dut (.r1, .r2, .r3, .y);

  function automatic int ref3(int p, int q, int s);
    int v = p;
    if (q < v) v = q;
    if (s < v) v = s;
    return v;
  endfunction

  task automatic check(int p, int q, int s);
    r1 = 8'(p); r2 = 8'(q); r3 = 8'(s);
    #1;
    checks++;
    if (int'(y) != ref3(p, q, s)) begin
      failures++;
      $display("FAIL min4(%0d,%0d,%0d) = %0d, expected %0d", p, q, s, y, ref3(p, q, s));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int corner[6] = '{0, 1, 127, 128, 254, 255};
    foreach (corner[i]) foreach (corner[j]) foreach (corner[k])
      check(corner[i], corner[j], corner[k]);
    repeat (2000) check($urandom_range(255), $urandom_range(255), $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
