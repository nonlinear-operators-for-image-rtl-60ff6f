// Testbench for pmf_cwmf: a stream of random plus masks (including masks
// where the centre is the smallest or largest value); each PMF output must
// be the sorted median of the five pixels and each CWMF output the median of
// the seven with the centre repeated three times, exactly 4 clocks after
// the mask. A stall (en low) must freeze the pipeline.
module tb_pmf_cwmf;
  import img_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  pixel_t n, w, c, e, s, pmf, cwmf;
  int checks = 0, failures = 0, clamps = 0;
  pmf_cwmf dut (.clk, .en, .n, .w, .c, .e, .s, .pmf, .cwmf);

  int qp [$], qc [$];

  initial begin
    #400000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = (i % 17) != 5;
      if (en) begin
        n = 8'($urandom); w = 8'($urandom); e = 8'($urandom); s = 8'($urandom);
        c = (i % 5 == 0) ? 8'd0 : (i % 5 == 1) ? 8'd255 : 8'($urandom);
        qp.push_back(med5(n, w, c, e, s));
        qc.push_back(tb_ref_pkg::cwmf(n, w, c, e, s));
        if (qc[$] != int'(c)) clamps++;
        if (qp.size() > 4) begin
          int ep, ec;
          ep = qp.pop_front(); ec = qc.pop_front();
          checks += 2;
          if (int'(pmf) != ep) begin failures++; $display("FAIL pmf %0d exp %0d", pmf, ep); end
          if (int'(cwmf) != ec) begin failures++; $display("FAIL cwmf %0d exp %0d", cwmf, ec); end
        end
      end else begin
        n = 8'($urandom); c = 8'($urandom);
      end
    end
    checks++;
    if (clamps == 0) begin failures++; $display("FAIL no CWMF clamp"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
