// Testbench for radix4_mult at its default 10x6-bit size with 3 output
// digits: a stream of random and extreme signed operands; each output must
// equal floor(a*b / 2^10) (the 6 most significant product bits) and must
// appear exactly 8 clocks after its operands. A second instance with 8
// output digits must return the full product.
module tb_radix4_mult;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [9:0]  a;
  logic signed [5:0]  b;
  logic signed [5:0]  p;
  logic signed [15:0] pf;
  int checks = 0, failures = 0;
  radix4_mult dut (.clk, .a, .b, .p);
  radix4_mult #(.OUT_DIGITS(8)) dut_full (.clk, .a, .b, .p(pf));

  int q [$];
  int qf [$];

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    a = 0; b = 0;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      case (n % 50)
        0: begin a = -10'sd512; b = -6'sd32; end
        1: begin a = 10'sd511;  b = 6'sd31;  end
        2: begin a = -10'sd512; b = 6'sd31;  end
        default: begin a = 10'($urandom); b = 6'($urandom); end
      endcase
      qf.push_back(int'(a) * int'(b));
      q.push_back((int'(a) * int'(b)) >>> 10);
      if (n >= 8) begin
        int e, ef;
        e = q.pop_front();
        ef = qf.pop_front();
        checks += 2;
        if (int'(p) != e) begin failures++; $display("FAIL n=%0d p=%0d exp=%0d", n, p, e); end
        if (int'(pf) != ef) begin failures++; $display("FAIL full n=%0d p=%0d exp=%0d", n, pf, ef); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
