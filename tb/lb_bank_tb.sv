// lb_bank_tb: checks one 8-word loop buffer memory: tags clear after reset
// and after tag_clr, a write stores the word and sets only its own tag, a
// read returns the word one cycle later, the output holds while ce is low,
// and tag_clr wins over a write in the same cycle. Random operations are
// compared with a reference array and tag vector kept by the testbench.
module lb_bank_tb;
  localparam int unsigned WORDS = 8, WIDTH = 16, AW = 3;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, ce, we, tag_clr, tag_hit;
  logic [AW-1:0] addr, tag_addr;
  logic [WIDTH-1:0] wdata, rdata;

  lb_bank #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .we(we), .addr(addr), .wdata(wdata),
    .rdata(rdata), .tag_clr(tag_clr), .tag_addr(tag_addr), .tag_hit(tag_hit));

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] ref_mem [WORDS];
  logic [WORDS-1:0] ref_tag;
  logic [WIDTH-1:0] ref_rd;
  bit have_rd = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic check_tags();
    for (int i = 0; i < WORDS; i++) begin
      tag_addr = AW'(i);
      #1 chk(tag_hit == ref_tag[i], $sformatf("tag %0d", i));
    end
  endtask

  initial begin
    rst_n = 0; ce = 0; we = 0; tag_clr = 0; addr = '0; tag_addr = '0; wdata = '0;
    ref_tag = '0;
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check_tags();
    // fill every word
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      ce = 1; we = 1; addr = AW'(i); wdata = WIDTH'($urandom);
      ref_mem[i] = wdata;
      @(negedge clk);
      ce = 0; we = 0;
      ref_tag[i] = 1'b1;
      check_tags();
    end
    // random traffic
    for (int n = 0; n < 600; n++) begin
      int op;
      op = int'($urandom % 6);
      @(negedge clk);
      ce = 0; we = 0; tag_clr = 0;
      addr = AW'($urandom);
      case (op)
        0, 1: begin                        // write
          ce = 1; we = 1; wdata = WIDTH'($urandom);
          ref_mem[addr] = wdata; ref_tag[addr] = 1'b1;
        end
        2, 3: begin                        // read
          ce = 1; ref_rd = ref_mem[addr]; have_rd = 1;
        end
        4: begin                           // clear together with a write
          tag_clr = 1; ce = 1; we = 1; wdata = WIDTH'($urandom);
          ref_mem[addr] = wdata; ref_tag = '0;
        end
        default: ;                         // idle: output must hold
      endcase
      @(negedge clk);
      ce = 0; we = 0; tag_clr = 0;
      if (op inside {2, 3} || (op == 5 && have_rd)) chk(rdata == ref_rd, $sformatf("read data op %0d", op));
      check_tags();
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
