// tb_mac_engine -- self-checking test of the MAC engine with 4 PEs.
// Each output is a dot product taken in several passes: pass p uses core row
// (output*PASSES + p) of every PE and alternates buffer banks, and the next
// pass's activations are written into the idle bank while the current pass
// runs. Weight and activation slices are random with many all-zero slices.
// Checks: accumulator after every pass, ReLU + shift + saturation result on
// the last pass, out_valid, pass_skips, the write-skip outputs and the
// latency (done 13 cycles after the start cycle, 5 when every PE skips).
module tb_mac_engine;
  import tsnmc_pkg::*;
  localparam int NPE = 4;
  localparam int PASSES = 3;
  localparam int OUTS = 40;
  localparam int DEPTH = CORE_ROWS * CORE_SUBS;

  int checks = 0, failures = 0;
  int n_allskip = 0, n_relu0 = 0, n_sat = 0, n_mid = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic w_we, w_wr_skip, a_we, a_bank, a_wr_skip, start, bank, first, last;
  logic busy, cur_bank, done, out_valid;
  logic [1:0] w_pe, a_pe;
  logic [ROW_AW-1:0] w_addr, row_addr;
  vec_t w_data, a_data;
  logic [4:0] shift;
  logic [2:0] pass_skips;
  logic signed [ACC_W-1:0] acc;
  logic [DATA_W-1:0] out_act;

  mac_engine #(.N_PE(NPE)) dut (.*);

  vec_t wmem [NPE][DEPTH];
  vec_t amem [NPE][2];

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

  function automatic vec_t rnd_vec(int zero_pct);
    if (($urandom % 100) < zero_pct) return '0;
    return {$urandom, $urandom};
  endfunction

  task automatic write_w(int p, int r, vec_t d);
    @(negedge clk);
    w_we = 1; w_pe = 2'(p); w_addr = ROW_AW'(r); w_data = d;
    #1 chk(w_wr_skip == (d == '0), "weight write-skip");
    @(negedge clk); w_we = 0;
    wmem[p][r] = d;
  endtask

  // Activation write; may be issued while a pass runs on the other bank.
  task automatic write_a(int p, int b, vec_t d);
    @(negedge clk);
    a_we = 1; a_pe = 2'(p); a_bank = b[0]; a_data = d;
    #1 chk(a_wr_skip == (d == '0), "activation write-skip");
    @(negedge clk); a_we = 0;
    amem[p][b] = d;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_acc;
    w_we = 0; a_we = 0; start = 0; first = 0; last = 0; bank = 0; shift = '0;
    w_pe = '0; a_pe = '0; a_bank = 0; w_addr = '0; row_addr = '0; w_data = '0; a_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPE; p++)
      for (int r = 0; r < OUTS * PASSES; r++) write_w(p, r, rnd_vec(30));
    for (int p = 0; p < NPE; p++) write_a(p, 0, rnd_vec(30));
    for (int o = 0; o < OUTS; o++) begin
      automatic int sh = (o % 4 == 0) ? 0 : 6 + ($urandom % 6);
      ref_acc = 0;
      for (int ps = 0; ps < PASSES; ps++) begin
        automatic int r = o * PASSES + ps;
        automatic int b = (o * PASSES + ps) % 2;
        automatic int cyc = 0, nskip = 0;
        automatic longint pass_sum = 0;
        for (int p = 0; p < NPE; p++) begin
          pass_sum += dot(amem[p][b], wmem[p][r]);
          if (amem[p][b] == '0 || wmem[p][r] == '0) nskip++;
        end
        @(negedge clk);
        start = 1; row_addr = ROW_AW'(r); bank = b[0]; first = (ps == 0);
        last = (ps == PASSES - 1); shift = 5'(sh);
        @(negedge clk);
        start = 0; cyc = 1;
        chk(busy && cur_bank == b[0], "busy and bank in use");
        // ping-pong: load the next pass's activations into the idle bank
        // while the pass runs
        fork
          for (int p = 0; p < NPE; p++) write_a(p, 1 - b, rnd_vec(25));
          while (!done && cyc < 60) begin @(negedge clk); cyc++; end
        join
        ref_acc += pass_sum;
        if (nskip == NPE) n_allskip++;
        chk(cyc == ((nskip == NPE) ? 5 : 13), $sformatf("latency %0d nskip %0d", cyc, nskip));
        chk(pass_skips == 3'(nskip), $sformatf("pass_skips %0d want %0d", pass_skips, nskip));
        chk(longint'(acc) == ref_acc, $sformatf("acc %0d want %0d", acc, ref_acc));
        chk(out_valid == (ps == PASSES - 1), "out_valid on last pass only");
        if (ps == PASSES - 1) begin
          automatic longint q = (ref_acc < 0) ? 0 : (ref_acc >>> sh);
          if (ref_acc < 0) n_relu0++;
          else if (q > 255) n_sat++;
          else n_mid++;
          if (q > 255) q = 255;
          chk(longint'(out_act) == q, $sformatf("out_act %0d want %0d", out_act, q));
        end
      end
    end
    chk(n_allskip > 0 && n_relu0 > 0 && n_sat > 0 && n_mid > 0,
        $sformatf("cases seen: allskip %0d relu0 %0d sat %0d mid %0d", n_allskip, n_relu0, n_sat, n_mid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
