// Testbench for cmf: a stream of random columns; for every mask formed by
// the last three columns the output 4 enabled clocks later must be the
// sorted median of the centre and the four corners. Stalls (en low) with
// changing inputs must not disturb the column history.
module tb_cmf;
  import img_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  pixel_t top, mid, bot, med;
  int checks = 0, failures = 0;
  cmf dut (.clk, .en, .top, .mid, .bot, .med);

  pixel_t ct [$], cm [$], cb [$];
  int q [$];

  initial begin
    #400000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = (i % 13) != 7;
      top = 8'($urandom); mid = 8'($urandom); bot = 8'($urandom);
      if (en) begin
        ct.push_back(top); cm.push_back(mid); cb.push_back(bot);
        if (ct.size() >= 3) begin
          int k;
          k = ct.size();
          q.push_back(med5(ct[k-3], cb[k-3], cm[k-2], ct[k-1], cb[k-1]));
        end else q.push_back(-1);
        if (q.size() > 4) begin
          int ev;
          ev = q.pop_front();
          if (ev >= 0) begin
            checks++;
            if (int'(med) != ev) begin failures++; $display("FAIL i=%0d med %0d exp %0d", i, med, ev); end
          end
        end
        if (ct.size() > 8) begin void'(ct.pop_front()); void'(cm.pop_front()); void'(cb.pop_front()); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
