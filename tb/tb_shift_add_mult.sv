// Testbench for shift_add_mult: a stream of random signed inputs with all
// eight codes; each product must equal a * value(code) * 8 exactly and must
// appear exactly 3 clocks after its operands (the stated latency).
module tb_shift_add_mult;
  import img_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [9:0]  a;
  mu_code_t           code;
  logic signed [12:0] p;
  int checks = 0, failures = 0;
  shift_add_mult dut (.clk, .a, .code, .p);

  // value of each code in eighths
  function automatic int eighths(mu_code_t c);
    case (c)
      3'b000: return 0;  3'b001: return 1;  3'b011: return 2;
      3'b010: return 4;  3'b101: return 4;  3'b100: return 6;
      3'b110: return 7;  default: return 8;
    endcase
  endfunction

  int exp_q [$];

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    a = 0; code = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      a = (n < 16) ? ((n & 1) ? -10'sd512 : 10'sd511) : 10'($urandom);
      code = 3'(n);
      exp_q.push_back(int'(a) * eighths(code));
      if (n >= 3) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(p) != e) begin
          failures++;
          $display("FAIL n=%0d p=%0d exp=%0d", n, p, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
