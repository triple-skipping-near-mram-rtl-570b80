// tb_nmc_pe -- self-checking test of one NMC processing element.
// Loads all core-array rows with random signed weight vectors (one row in
// three all zero) and both buffer banks with activation vectors, then runs
// an operation for many (row, bank) pairs and compares result with the dot
// product computed here. Checks: the result, the skipped output (set exactly
// when the weight or the activation vector is zero), the result being 0 on
// a skip, the write-skip pulses, the latency (done 11 cycles after the
// start cycle when computing, 3 when skipping) and a write into the idle
// buffer bank while the PE computes from the other bank.
module tb_nmc_pe;
  import tsnmc_pkg::*;
  localparam int unsigned DEPTH = CORE_ROWS * CORE_SUBS;
  localparam int LAT_NZ = 11, LAT_Z = 3;

  int checks = 0, failures = 0;
  int n_skip = 0, n_calc = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic w_we, w_wr_skip, a_we, a_bank, a_wr_skip, start, bank, busy, done, skipped;
  logic [ROW_AW-1:0] w_addr, row_addr;
  vec_t w_data, a_data;
  psum_t result;

  nmc_pe dut (.*);

  vec_t wmem [DEPTH];
  vec_t amem [2];

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint dot(vec_t a, vec_t w);
    longint s = 0;
    for (int k = 0; k < VEC_LEN; k++)
      s += longint'(a[DATA_W*k +: DATA_W]) * longint'(signed'(w[DATA_W*k +: DATA_W]));
    return s;
  endfunction

  task automatic write_w(int r, vec_t d);
    @(negedge clk);
    w_we = 1; w_addr = ROW_AW'(r); w_data = d;
    #1 chk(w_wr_skip == (d == '0), "weight write-skip pulse");
    @(negedge clk); w_we = 0;
    wmem[r] = d;
  endtask

  task automatic write_a(int b, vec_t d);
    @(negedge clk);
    a_we = 1; a_bank = b[0]; a_data = d;
    #1 chk(a_wr_skip == (d == '0), "activation write-skip pulse");
    @(negedge clk); a_we = 0;
    amem[b] = d;
  endtask

  // Runs one operation. If new_a is not 'x (flagged by do_pp), writes it to
  // the other bank while the PE is busy.
  task automatic run_op(int r, int b, bit do_pp, vec_t pp_data);
    automatic int cyc = 0;
    automatic bit zero = (wmem[r] == '0) || (amem[b] == '0);
    @(negedge clk);
    start = 1; row_addr = ROW_AW'(r); bank = b[0];
    @(negedge clk);
    start = 0; cyc = 1;
    chk(busy, "busy after start");
    if (do_pp) begin
      a_we = 1; a_bank = ~b[0]; a_data = pp_data;
      @(negedge clk); a_we = 0; cyc++;
      amem[1-b] = pp_data;
    end
    while (!done && cyc < 40) begin @(negedge clk); cyc++; end
    chk(cyc == (zero ? LAT_Z : LAT_NZ), $sformatf("latency %0d (zero=%0d)", cyc, zero));
    chk(skipped == zero, $sformatf("skipped=%0d zero=%0d", skipped, zero));
    chk(longint'(result) == dot(amem[b], wmem[r]),
        $sformatf("row %0d bank %0d: result %0d want %0d", r, b, result, dot(amem[b], wmem[r])));
    if (zero) n_skip++; else n_calc++;
    @(negedge clk);
    chk(!busy, "idle after done");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_we = 0; a_we = 0; start = 0; a_bank = 0; bank = 0; w_addr = '0; row_addr = '0;
    w_data = '0; a_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < DEPTH; r++) write_w(r, (r % 3 == 2) ? '0 : {$urandom, $urandom});
    write_w(0, {8{8'h80}});                       // extreme weights
    write_a(0, '1);                               // extreme activations
    write_a(1, {$urandom, $urandom});
    run_op(0, 0, 0, '0);
    for (int t = 0; t < 150; t++) begin
      automatic int r = $urandom % DEPTH;
      automatic int b = $urandom % 2;
      if (t % 10 == 9) write_a(b, '0);
      else if (t % 10 == 4) write_a(b, {$urandom, $urandom});
      run_op(r, b, (t % 7 == 3), (t % 14 == 3) ? '0 : {$urandom, $urandom});
    end
    chk(n_skip > 10 && n_calc > 10, $sformatf("both paths exercised (%0d skip, %0d calc)", n_skip, n_calc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
