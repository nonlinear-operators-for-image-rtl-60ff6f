// Testbench for config_chain: after reset the configuration is zero; a
// random configuration word shifted in MSB first must appear unchanged in
// cfg, bits must leave at cfg_sdo in the same order after CFG_W clocks,
// and the word must hold while cfg_shift is low.
module tb_config_chain;
  import img_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, cfg_shift, cfg_sdi, cfg_sdo;
  cfg_t cfg;
  int checks = 0, failures = 0;
  config_chain dut (.clk, .rst_n, .cfg_shift, .cfg_sdi, .cfg_sdo, .cfg);

  logic [CFG_W-1:0] word, word2;

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0; cfg_shift = 0; cfg_sdi = 0;
    #12 rst_n = 1;
    checks++;
    if (cfg !== '0) begin failures++; $display("FAIL reset"); end
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < CFG_W; i++) word[i] = 1'($urandom);
      for (int i = 0; i < CFG_W; i++) word2[i] = 1'($urandom);
      for (int i = CFG_W - 1; i >= 0; i--) begin
        @(negedge clk); cfg_shift = 1; cfg_sdi = word[i];
      end
      @(negedge clk); cfg_shift = 0;
      checks++;
      if (cfg_t'(word) !== cfg) begin failures++; $display("FAIL load %0d", r); end
      repeat (5) @(negedge clk);
      checks++;
      if (cfg_t'(word) !== cfg) begin failures++; $display("FAIL hold %0d", r); end
      // shifting the next word pushes the previous one out MSB first
      for (int i = CFG_W - 1; i >= 0; i--) begin
        @(negedge clk);
        checks++;
        if (cfg_sdo !== word[i]) begin failures++; $display("FAIL sdo bit %0d", i); end
        cfg_shift = 1; cfg_sdi = word2[i];
      end
      @(negedge clk); cfg_shift = 0;
      checks++;
      if (cfg_t'(word2) !== cfg) begin failures++; $display("FAIL second word"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
