// tb_mram_core_array -- self-checking test of the weight array.
// Fills every row with a random vector or, for one row in four, an all-zero
// vector whose flag is 1. Checks: sensed flags and data match a reference
// copy; a zero-flag write leaves the data cells unchanged (write skipping)
// and wr_data_en reflects it; sense amplifier outputs hold while disabled;
// flag and data sensing are independent; the result appears one cycle after
// the enable.
module tb_mram_core_array;
  import tsnmc_pkg::*;
  localparam int unsigned DEPTH = CORE_ROWS * CORE_SUBS;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we, wflag, wr_data_en, sae_flag, sae_data, flag_q;
  logic [ROW_AW-1:0] waddr, raddr;
  vec_t wdata, data_q;

  mram_core_array dut (.*);

  vec_t ref_data [DEPTH];
  logic ref_flag [DEPTH];

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write_row(int a, vec_t d);
    @(negedge clk);
    we = 1; waddr = ROW_AW'(a); wdata = d; wflag = (d == '0);
    #1 chk(wr_data_en == (d != '0), "wr_data_en");
    @(negedge clk);
    we = 0;
    ref_flag[a] = (d == '0);
    if (d != '0) ref_data[a] = d;
  endtask

  task automatic read_row(int a);
    @(negedge clk);
    raddr = ROW_AW'(a); sae_flag = 1; sae_data = 1;
    @(negedge clk);
    sae_flag = 0; sae_data = 0;
    chk(flag_q == ref_flag[a], $sformatf("flag row %0d", a));
    chk(data_q == ref_data[a], $sformatf("data row %0d: %h vs %h", a, data_q, ref_data[a]));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wflag = 0; sae_flag = 0; sae_data = 0; waddr = '0; raddr = '0; wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // first fill: every row non-zero so the data cells hold known values
    for (int a = 0; a < DEPTH; a++) write_row(a, {$urandom, $urandom} | 64'h1);
    for (int a = 0; a < DEPTH; a++) read_row(a);
    // second fill: one row in four becomes zero (only the flag is written)
    for (int a = 0; a < DEPTH; a++)
      write_row(a, (a % 4 == 1) ? '0 : {$urandom, $urandom});
    for (int a = 0; a < DEPTH; a++) read_row(a);
    // hold: change raddr with sensing off; outputs keep the last sensed row
    read_row(5);
    begin
      automatic vec_t held = data_q;
      automatic logic hf = flag_q;
      @(negedge clk); raddr = 9;
      repeat (3) @(negedge clk);
      chk(data_q == held && flag_q == hf, "sense amplifiers hold while disabled");
      // flag-only sensing leaves the data latch alone
      sae_flag = 1; @(negedge clk); sae_flag = 0;
      chk(flag_q == ref_flag[9], "flag-only sense");
      chk(data_q == held, "data held during flag-only sense");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
