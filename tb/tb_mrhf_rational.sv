// Testbench for mrhf_rational: a stream of random and structured
// (phi1, phi2, phi3) triples. Each output must match the integer model of
// the scaling-division algorithm exactly, must appear exactly 8 clocks after
// its inputs, and must move phi2 in the direction of the exact operator with h = 0.01,
// k = 6.25, by at most four times as much (the scaling divider keeps only
// about 4 significant bits). All three scaling counts (0, 1, 2) must occur.
module tb_mrhf_rational;
  import img_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  pixel_t p1, p2, p3, y;
  logic [1:0] den, ded;
  int checks = 0, failures = 0;
  int seen_en [3], seen_ed [3];
  mrhf_rational dut (.clk, .en(1'b1), .phi1(p1), .phi2(p2), .phi3(p3), .y, .dbg_en(den), .dbg_ed(ded));

  int qy [$], qen [$], qed [$];
  real qr [$];
  int qp2 [$];

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    p1 = 0; p2 = 0; p3 = 0;
    for (int n = 0; n < 4000; n++) begin
      int e1, e2;
      @(negedge clk);
      case (n % 4)
        0: begin p1 = 8'($urandom); p2 = 8'($urandom); p3 = 8'($urandom); end
        1: begin p2 = 8'($urandom); p1 = 8'(int'(p2) + int'($urandom % 9) - 4);
                 p3 = 8'(int'(p2) + int'($urandom % 9) - 4); end
        2: begin p2 = 8'($urandom % 200 + 20); p1 = 8'(p2 + 8'($urandom % 16)); p3 = 8'(p2 - 8'($urandom % 16)); end
        default: begin p1 = 8'($urandom % 64); p2 = 8'($urandom % 64 + 96); p3 = 8'($urandom % 64 + 192); end
      endcase
      qy.push_back(rat(p1, p2, p3, 6, e1, e2));
      qen.push_back(e1); qed.push_back(e2);
      qr.push_back(rat_real(p1, p2, p3, 6.25));
      qp2.push_back(int'(p2));
      if (n >= 8) begin
        int ey, ee, ed;
        real er, corr, hwc;
        ey = qy.pop_front(); ee = qen.pop_front(); ed = qed.pop_front(); er = qr.pop_front();
        checks++;
        if (int'(y) != ey || int'(den) != ee || int'(ded) != ed) begin
          failures++;
          $display("FAIL n=%0d y=%0d exp=%0d en=%0d/%0d ed=%0d/%0d", n, y, ey, den, ee, ded, ed);
        end
        checks++;
        // coarse division: the correction must point the same way as the
        // exact one and be at most 4 times as large (plus 2 levels)
        corr = er - real'(qp2[0]);
        hwc  = real'(y) - real'(qp2.pop_front());
        if ((corr * hwc < 0.0 && (hwc > 2.0 || hwc < -2.0)) || hwc ** 2 > (2.0 + 4.0 * (corr < 0.0 ? -corr : corr)) ** 2) begin
          failures++;
          $display("FAIL accuracy n=%0d y=%0d exact=%f", n, y, er);
        end
        seen_en[den]++; seen_ed[ded]++;
      end
    end
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (seen_en[i] == 0) begin failures++; $display("FAIL numerator scaling %0d never seen", i); end
      if (seen_ed[i] == 0) begin failures++; $display("FAIL denominator scaling %0d never seen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
