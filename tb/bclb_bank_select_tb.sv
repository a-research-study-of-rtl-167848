// bclb_bank_select_tb: checks the BCLB bank choice for every loop body size
// and every index, for the default 8 banks of 8 words and for a pair of
// unequal banks (8 and 32 words). Expected values are worked out here from
// the rule: the smallest single bank that holds the body, otherwise banks
// chained from bank 0 until the body fits.
module bclb_bank_select_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst_n, cfg_load;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------- 8 banks of 8 words
  logic [11:0] size_u;
  logic fits_u, hit_ua, hit_ub;
  logic [7:0] act_u;
  logic [5:0] idx_ua, idx_ub;
  logic [2:0] bank_ua, bank_ub, word_ua, word_ub;

  bclb_bank_select #(.NUM_BANKS(8), .SIZE_W(12), .IDX_W(6), .LAW(3)) dut_u (
    .clk(clk), .rst_n(rst_n), .cfg_load(cfg_load), .body_size(size_u),
    .fits(fits_u), .bank_act(act_u),
    .idx_a(idx_ua), .hit_a(hit_ua), .bank_a(bank_ua), .word_a(word_ua),
    .idx_b(idx_ub), .hit_b(hit_ub), .bank_b(bank_ub), .word_b(word_ub));

  // ---------------------------------------------------- banks of 8 and 32
  localparam int unsigned HW [2] = '{8, 32};
  logic [11:0] size_h;
  logic fits_h, hit_ha, hit_hb;
  logic [1:0] act_h;
  logic [5:0] idx_ha, idx_hb;
  logic [0:0] bank_ha, bank_hb;
  logic [4:0] word_ha, word_hb;

  bclb_bank_select #(.NUM_BANKS(2), .BANK_WORDS(HW), .SIZE_W(12), .IDX_W(6), .LAW(5)) dut_h (
    .clk(clk), .rst_n(rst_n), .cfg_load(cfg_load), .body_size(size_h),
    .fits(fits_h), .bank_act(act_h),
    .idx_a(idx_ha), .hit_a(hit_ha), .bank_a(bank_ha), .word_a(word_ha),
    .idx_b(idx_hb), .hit_b(hit_hb), .bank_b(bank_hb), .word_b(word_hb));

  initial begin
    rst_n = 0; cfg_load = 0; size_u = '0; size_h = '0;
    idx_ua = '0; idx_ub = '0; idx_ha = '0; idx_hb = '0;
    @(negedge clk); rst_n = 1;
    for (int s = 0; s <= 70; s++) begin
      int nb;
      @(negedge clk);
      size_u = 12'(s); size_h = 12'(s); cfg_load = 1;
      #1;
      chk(fits_u == (s >= 1 && s <= 64), $sformatf("fits uniform %0d", s));
      chk(fits_h == (s >= 1 && s <= 40), $sformatf("fits 8+32 %0d", s));
      @(negedge clk);
      cfg_load = 0;
      if (s < 1 || s > 40) continue;
      // uniform banks
      if (s <= 64) begin
        nb = (s + 7) / 8;
        for (int b = 0; b < 8; b++)
          chk(act_u[b] == (b < nb), $sformatf("active bank %0d for size %0d", b, s));
        for (int i = 0; i < 64; i++) begin
          idx_ua = 6'(i); idx_ub = 6'(63 - i);
          #1;
          chk(hit_ua == (i < nb * 8), $sformatf("hit a %0d/%0d", i, s));
          if (i < nb * 8) chk(bank_ua == 3'(i / 8) && word_ua == 3'(i % 8),
                             $sformatf("map a %0d", i));
          chk(hit_ub == (63 - i < nb * 8), $sformatf("hit b %0d/%0d", 63 - i, s));
          if (63 - i < nb * 8) chk(bank_ub == 3'((63 - i) / 8) && word_ub == 3'((63 - i) % 8),
                                  $sformatf("map b %0d", 63 - i));
        end
      end
      // banks of 8 and 32
      for (int i = 0; i < 48; i++) begin
        bit eh; int eb, ew;
        idx_ha = 6'(i); idx_hb = 6'(i);
        if (s <= 8)       begin eh = (i < 8);  eb = 0; ew = i; end
        else if (s <= 32) begin eh = (i < 32); eb = 1; ew = i; end
        else              begin eh = (i < 40); eb = (i < 8) ? 0 : 1; ew = (i < 8) ? i : i - 8; end
        #1;
        chk(act_h == ((s <= 8) ? 2'b01 : (s <= 32) ? 2'b10 : 2'b11), $sformatf("active 8+32 size %0d", s));
        chk(hit_ha == eh && hit_hb == eh, $sformatf("hit 8+32 %0d/%0d", i, s));
        if (eh) chk(bank_ha == 1'(eb) && word_ha == 5'(ew) && bank_hb == 1'(eb) && word_hb == 5'(ew),
                    $sformatf("map 8+32 %0d/%0d", i, s));
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
