// tb_tsnmc_apb_regs -- self-checking test of the APB register interface.
// The engine side is driven by the testbench. Checks: read-back of the data
// and shift registers; the weight-write, activation-write and start commands
// (one pulse each, with the fields decoded from PWDATA); wait states while
// the engine is busy for CMD, WCMD and ACMD to the bank in use, and none for
// ACMD to the other bank; the statistics counters; STATUS fields; PSLVERR for
// an unmapped address.
module tb_tsnmc_apb_regs;
  import tsnmc_pkg::*;

  int checks = 0, failures = 0;
  logic pclk = 0, presetn = 0;
  always #5 pclk = ~pclk;

  logic psel, penable, pwrite, pready, pslverr;
  logic [7:0] paddr;
  logic [31:0] pwdata, prdata;
  logic w_we, w_wr_skip, a_we, a_bank, a_wr_skip, start, bank, first, last;
  logic busy, cur_bank, done, out_valid;
  logic [6:0] w_pe, a_pe, w_addr, row_addr, pass_skips;
  vec_t wr_data;
  logic [4:0] shift;
  logic signed [ACC_W-1:0] acc;
  logic [DATA_W-1:0] out_act;

  tsnmc_apb_regs dut (.*);

  // pulse monitors
  int n_wwe = 0, n_awe = 0, n_start = 0;
  logic [6:0] m_pe, m_addr;
  logic m_bank, m_first, m_last;
  vec_t m_data;
  always @(posedge pclk) begin
    if (w_we) begin n_wwe++; m_pe = w_pe; m_addr = w_addr; m_data = wr_data; end
    if (a_we) begin n_awe++; m_pe = a_pe; m_bank = a_bank; m_data = wr_data; end
    if (start) begin n_start++; m_addr = row_addr; m_bank = bank; m_first = first; m_last = last; end
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic apb(bit wr, logic [7:0] a, logic [31:0] d, output logic [31:0] rd,
                     output int waits, output logic err);
    @(negedge pclk);
    psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(negedge pclk);
    penable = 1; waits = 0;
    #1;
    while (!pready) begin @(negedge pclk); waits++; #1; end
    rd = prdata; err = pslverr;
    @(negedge pclk);
    psel = 0; penable = 0;
  endtask

  logic [31:0] rd;
  int waits;
  logic err;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    psel = 0; penable = 0; pwrite = 0; paddr = '0; pwdata = '0;
    w_wr_skip = 0; a_wr_skip = 0; busy = 0; cur_bank = 0; done = 0; pass_skips = '0;
    acc = '0; out_valid = 0; out_act = '0;
    repeat (3) @(negedge pclk);
    presetn = 1;
    // data and shift registers
    apb(1, 8'h0C, 32'hDEADBEEF, rd, waits, err);
    apb(1, 8'h10, 32'h01234567, rd, waits, err);
    apb(1, 8'h08, 32'd9, rd, waits, err);
    apb(0, 8'h0C, 0, rd, waits, err); chk(rd == 32'hDEADBEEF && !err, "DLO readback");
    apb(0, 8'h10, 0, rd, waits, err); chk(rd == 32'h01234567, "DHI readback");
    apb(0, 8'h08, 0, rd, waits, err); chk(rd == 32'd9 && shift == 5'd9, "SHIFT readback");
    // weight write command
    apb(1, 8'h14, {9'd0, 7'd77, 9'd0, 7'd101}, rd, waits, err);
    chk(n_wwe == 1 && m_pe == 77 && m_addr == 101 && m_data == 64'h01234567DEADBEEF, "WCMD pulse");
    chk(waits == 0, "no wait when idle");
    // activation write command
    apb(1, 8'h18, {9'd0, 7'd5, 15'd0, 1'b1}, rd, waits, err);
    chk(n_awe == 1 && m_pe == 5 && m_bank == 1, "ACMD pulse");
    // start command
    apb(1, 8'h00, {21'd0, 1'b1, 1'b0, 1'b1, 1'b0, 7'd42}, rd, waits, err);
    chk(n_start == 1 && m_addr == 42 && m_bank == 1 && !m_first && m_last, "CMD start pulse");
    apb(0, 8'h00, 0, rd, waits, err); chk(rd[10:0] == 11'b10100101010, "CMD readback");
    // busy: ACMD to the idle bank passes, ACMD to the bank in use waits
    busy = 1; cur_bank = 1;
    fork   // busy is released after a while so that a wrongly held write ends
      apb(1, 8'h18, {9'd0, 7'd6, 15'd0, 1'b0}, rd, waits, err);
      begin repeat (8) @(negedge pclk); busy = 0; end
    join
    chk(waits == 0 && n_awe == 2, $sformatf("ping-pong write to idle bank waited %0d", waits));
    busy = 1;
    fork
      apb(1, 8'h18, {9'd0, 7'd6, 15'd0, 1'b1}, rd, waits, err);
      begin repeat (4) @(negedge pclk); chk(n_awe == 2, "held write not yet issued"); busy = 0; end
    join
    chk(waits >= 2 && n_awe == 3, $sformatf("ACMD to bank in use waited %0d", waits));
    busy = 1;
    fork
      apb(1, 8'h00, 32'd3, rd, waits, err);
      begin repeat (3) @(negedge pclk); busy = 0; end
    join
    chk(waits >= 1 && n_start == 2, "CMD waits while busy");
    busy = 1;
    fork
      apb(1, 8'h14, 32'd3, rd, waits, err);
      begin repeat (3) @(negedge pclk); busy = 0; end
    join
    chk(waits >= 1 && n_wwe == 2, "WCMD waits while busy");
    apb(0, 8'h2C, 0, rd, waits, err); chk(rd == 4, $sformatf("WAITS counter %0d", rd));
    // counters
    @(negedge pclk); done = 1; pass_skips = 7'd13; @(negedge pclk); done = 0;
    @(negedge pclk); done = 1; pass_skips = 7'd4;  @(negedge pclk); done = 0;
    @(negedge pclk); w_wr_skip = 1; @(negedge pclk); w_wr_skip = 0; a_wr_skip = 1;
    @(negedge pclk); a_wr_skip = 0;
    apb(0, 8'h20, 0, rd, waits, err); chk(rd == 2, "PASSES counter");
    apb(0, 8'h24, 0, rd, waits, err); chk(rd == 17, "SKIPOPS counter");
    apb(0, 8'h28, 0, rd, waits, err); chk(rd == 2, "WSKIPS counter");
    // status and accumulator
    out_valid = 1; out_act = 8'hA5; cur_bank = 1; busy = 0; acc = -32'sd1234;
    apb(0, 8'h04, 0, rd, waits, err); chk(rd == 32'h0001A502, $sformatf("STATUS %h", rd));
    apb(0, 8'h1C, 0, rd, waits, err); chk($signed(rd) == -1234, "ACC read");
    // unmapped address
    apb(0, 8'h40, 0, rd, waits, err); chk(err, "PSLVERR on unmapped address");
    apb(0, 8'h04, 0, rd, waits, err); chk(!err, "no PSLVERR on mapped address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
