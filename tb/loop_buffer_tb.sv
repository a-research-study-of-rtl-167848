// loop_buffer_tb: checks the loop buffer memory architecture in both forms,
// a CELB of 8 words and a BCLB of 4 banks of 8 words. For several loop body
// sizes it claims the buffer (cfg_load + tag_clr), records the body words
// through the write port, then reads every index back and compares the tag
// and the word with what was written; indexes beyond the claimed body (or
// the CELB size) must report no tag. For the BCLB it also checks which banks
// are active.
module loop_buffer_tb;
  import lb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst_n, cfg_load, tag_clr, rd, wr;
  logic [11:0] body_size;
  logic [4:0] rd_idx, wr_idx;
  logic [15:0] wdata;

  logic fits_c, tag_c, fits_b, tag_b;
  logic [0:0] act_c;
  logic [3:0] act_b;
  logic [15:0] rdata_c, rdata_b;
  localparam int unsigned CW [1] = '{8};

  loop_buffer #(.ARCH(ARCH_CELB), .NUM_BANKS(1), .BANK_WORDS(CW), .SIZE_W(12), .IDX_W(5)) dut_c (
    .clk(clk), .rst_n(rst_n), .cfg_load(cfg_load), .body_size(body_size),
    .fits(fits_c), .bank_act(act_c), .tag_clr(tag_clr), .rd(rd), .rd_idx(rd_idx),
    .tag_hit(tag_c), .wr(wr), .wr_idx(wr_idx), .wdata(wdata), .rdata(rdata_c));

  loop_buffer #(.ARCH(ARCH_BCLB), .NUM_BANKS(4), .SIZE_W(12), .IDX_W(5)) dut_b (
    .clk(clk), .rst_n(rst_n), .cfg_load(cfg_load), .body_size(body_size),
    .fits(fits_b), .bank_act(act_b), .tag_clr(tag_clr), .rd(rd), .rd_idx(rd_idx),
    .tag_hit(tag_b), .wr(wr), .wr_idx(wr_idx), .wdata(wdata), .rdata(rdata_b));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  logic [15:0] ref_w [32];

  initial begin
    int sizes [6] = '{1, 5, 8, 9, 20, 32};
    rst_n = 0; cfg_load = 0; tag_clr = 0; rd = 0; wr = 0;
    body_size = '0; rd_idx = '0; wr_idx = '0; wdata = '0;
    @(negedge clk); rst_n = 1;
    foreach (sizes[k]) begin
      int s;
      s = sizes[k];
      @(negedge clk);
      body_size = 12'(s); cfg_load = 1; tag_clr = 1;
      #1;
      chk(fits_c == (s <= 8), $sformatf("CELB fits %0d", s));
      chk(fits_b == (s <= 32), $sformatf("BCLB fits %0d", s));
      @(negedge clk);
      cfg_load = 0; tag_clr = 0;
      for (int b = 0; b < 4; b++)
        chk(act_b[b] == (b < (s + 7) / 8), $sformatf("BCLB active bank %0d size %0d", b, s));
      // record the body, in a scrambled order
      for (int j = 0; j < s; j++) begin
        int i;
        i = (j * 7 + 3) % s;
        @(negedge clk);
        wr = 1; wr_idx = 5'(i); wdata = 16'($urandom); ref_w[i] = wdata;
        rd_idx = 5'((i + 1) % 32);
      end
      @(negedge clk);
      wr = 0;
      // read everything back
      for (int i = 0; i < 32; i++) begin
        @(negedge clk);
        rd_idx = 5'(i); rd = 1;
        #1;
        chk(tag_c == (i < s && i < 8), $sformatf("CELB tag %0d size %0d", i, s));
        chk(tag_b == (i < s), $sformatf("BCLB tag %0d size %0d", i, s));
        @(negedge clk);
        rd = 0; rd_idx = 5'((i + 8) % 32);   // the output must not follow the index
        #1;
        if (i < s && i < 8) chk(rdata_c == ref_w[i], $sformatf("CELB word %0d size %0d", i, s));
        if (i < s)          chk(rdata_b == ref_w[i], $sformatf("BCLB word %0d size %0d", i, s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
