// Testbench for minmax_cell: exhaustive over a grid and random pairs,
// compared with the obvious max/min.
module tb_minmax_cell;
  logic [7:0] a, b, hi, lo;
  int checks = 0, failures = 0;
  minmax_cell dut (.a, .b, .hi, .lo);

  task automatic check(logic [7:0] x, logic [7:0] y);
    a = x; b = y; #1;
    checks++;
    if (hi !== ((x > y) ? x : y) || lo !== ((x > y) ? y : x)) begin
      failures++;
      $display("FAIL a=%0d b=%0d hi=%0d lo=%0d", x, y, hi, lo);
    end
  endtask

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int x = 0; x < 256; x += 15) for (int y = 0; y < 256; y += 17) check(8'(x), 8'(y));
    check(8'd5, 8'd5); check(8'd0, 8'd255); check(8'd255, 8'd0);
    repeat (500) check(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
