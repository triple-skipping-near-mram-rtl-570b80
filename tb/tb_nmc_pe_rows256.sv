// tb_nmc_pe_rows256 -- the processing element with its weight array grown to
// 256 rows per sub-array (256x65x2, the larger capacity option), checking
// that addressing covers all 512 rows: every row gets a distinct weight
// vector (one in four all zero), then operations on rows spread over the
// whole range are compared with a reference dot product, including the skip
// decision and the 11/3-cycle latency.
module tb_nmc_pe_rows256;
  import tsnmc_pkg::*;
  localparam int ROWS = 256;
  localparam int DEPTH = ROWS * 2;
  localparam int AW = $clog2(DEPTH);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic w_we, w_wr_skip, a_we, a_bank, a_wr_skip, start, bank, busy, done, skipped;
  logic [AW-1:0] w_addr, row_addr;
  vec_t w_data, a_data;
  psum_t result;

  nmc_pe #(.ROWS(ROWS)) dut (.*);

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

  initial begin
    #5000000;
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
    for (int r = 0; r < DEPTH; r++) begin
      wmem[r] = (r % 4 == 3) ? '0 : {$urandom, 16'(r), 16'($urandom)};
      @(negedge clk); w_we = 1; w_addr = AW'(r); w_data = wmem[r];
      @(negedge clk); w_we = 0;
    end
    for (int b = 0; b < 2; b++) begin
      amem[b] = {$urandom, $urandom} | 64'h0101010101010101;
      @(negedge clk); a_we = 1; a_bank = b[0]; a_data = amem[b];
      @(negedge clk); a_we = 0;
    end
    for (int t = 0; t < 200; t++) begin
      automatic int r = (t * 37 + 5) % DEPTH;
      automatic int b = t % 2;
      automatic int cyc = 0;
      automatic bit zero = (wmem[r] == '0);
      @(negedge clk); start = 1; row_addr = AW'(r); bank = b[0];
      @(negedge clk); start = 0; cyc = 1;
      while (!done && cyc < 40) begin @(negedge clk); cyc++; end
      chk(cyc == (zero ? 3 : 11), $sformatf("latency %0d", cyc));
      chk(skipped == zero, "skip decision");
      chk(longint'(result) == dot(amem[b], wmem[r]),
          $sformatf("row %0d: %0d want %0d", r, result, dot(amem[b], wmem[r])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
