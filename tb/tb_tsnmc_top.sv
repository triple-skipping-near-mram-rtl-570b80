// tb_tsnmc_top -- end-to-end test of the TS-NMC accelerator at its default
// size (98 PEs), running a 784-64-10 fully connected network with 8-bit
// weights over the APB interface, as a host processor would.
//
// Data is generated here: signed random weights with about one 8-weight
// slice in five pruned to zero, and a 28x28 "image" whose border is blank
// and whose centre has random pixels, some of them 0. Mapping:
//   layer 1  core row r (0..63) of PE p holds W1[r][8p +: 8]; the image
//            slice x[8p +: 8] is in buffer bank 0 of PE p. One pass per
//            hidden neuron r.
//   layer 2  core row 64+o of PE p < 8 holds W2[o][8p +: 8]; the hidden
//            vector is written to bank 1 of PEs 0..7 while layer 1 is still
//            running (ping-pong). Rows 64..73 and bank 1 of the other PEs
//            are written as zero vectors, so those PEs skip every layer-2
//            pass. One pass per output o.
// Every quantized output and accumulator value is compared with a reference
// computed here (ReLU, shift, saturate to 255). Then one output is run again
// as two back-to-back passes (accumulated, the second held by wait states),
// which must give twice the accumulator value.
// Mechanisms counted, each must occur: weight write skipping, activation
// write skipping, PE read/calculation skipping, a pass with every PE skipped
// except the active ones, ping-pong writes completed while busy, wait
// states, ReLU clamping, saturation, multi-pass accumulation. The write-skip,
// PE-skip and pass counters of the register interface must match exactly.
module tb_tsnmc_top;
  import tsnmc_pkg::*;
  localparam int NPE = 98;
  localparam int NIN = 784, NHID = 64, NOUT = 10;
  localparam int SH1 = 8, SH2 = 9;

  int checks = 0, failures = 0;
  logic pclk = 0, presetn = 0;
  always #5 pclk = ~pclk;

  logic psel, penable, pwrite, pready, pslverr;
  logic [7:0] paddr;
  logic [31:0] pwdata, prdata;

  tsnmc_top dut (.*);

  // network and reference
  logic signed [7:0] w1 [NHID][NIN];
  logic signed [7:0] w2 [NOUT][NHID];
  logic [7:0] x [NIN];
  logic [7:0] h_ref [NHID];
  logic [7:0] h_hw  [NHID];
  longint acc1 [NHID];
  longint acc2 [NOUT];

  int exp_wskips = 0, exp_skipops = 0, exp_passes = 0;
  int n_pp_nowait = 0, n_waits = 0, n_relu0 = 0, n_sat = 0, n_multipass = 0;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic apb(bit wr, logic [7:0] a, logic [31:0] d, output logic [31:0] rd,
                     output int waits);
    @(negedge pclk);
    psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(negedge pclk);
    penable = 1; waits = 0;
    #1;
    while (!pready) begin @(negedge pclk); waits++; #1; end
    rd = prdata;
    if (pslverr) begin failures++; $display("FAIL: PSLVERR at %h", a); end
    @(negedge pclk);
    psel = 0; penable = 0;
  endtask

  logic [31:0] rd;
  int waits, pp_waits;
  vec_t last_data = '1;

  task automatic set_data(vec_t v);
    if (v[31:0]  != last_data[31:0])  apb(1, 8'h0C, v[31:0],  rd, waits);
    if (v[63:32] != last_data[63:32]) apb(1, 8'h10, v[63:32], rd, waits);
    last_data = v;
  endtask

  task automatic write_weight(int p, int r, vec_t v);
    set_data(v);
    apb(1, 8'h14, {9'd0, 7'(p), 9'd0, 7'(r)}, rd, waits);
    if (v == '0) exp_wskips++;
  endtask

  task automatic write_act(int p, int b, vec_t v);
    set_data(v);
    apb(1, 8'h18, {9'd0, 7'(p), 15'd0, 1'(b)}, rd, waits);
    if (v == '0) exp_wskips++;
  endtask

  function automatic vec_t w1_slice(int r, int p);
    vec_t v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = w1[r][8*p + k];
    return v;
  endfunction

  function automatic vec_t x_slice(int p);
    vec_t v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = x[8*p + k];
    return v;
  endfunction

  function automatic bit w2_zero(int o, int p);
    for (int k = 0; k < 8; k++) if (w2[o][8*p + k] != 0) return 0;
    return 1;
  endfunction

  function automatic bit h_zero(int p);
    for (int k = 0; k < 8; k++) if (h_ref[8*p + k] != 0) return 0;
    return 1;
  endfunction

  function automatic logic [7:0] quant(longint a, int sh);
    longint q = (a < 0) ? 0 : (a >>> sh);
    return (q > 255) ? 8'd255 : 8'(q);
  endfunction

  // start a pass and wait until it is done; returns STATUS
  task automatic run_pass(int row, int b, bit first, bit last, output logic [31:0] status);
    apb(1, 8'h00, {21'd0, last, first, 1'(b), 1'b0, 7'(row)}, rd, waits);
    n_waits += waits;
    exp_passes++;
    do apb(0, 8'h04, 0, status, waits); while (status[0]);
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] st;
    psel = 0; penable = 0; pwrite = 0; paddr = '0; pwdata = '0;
    // ---- data ----
    for (int r = 0; r < NHID; r++)
      for (int p = 0; p < NPE; p++) begin
        automatic bit pruned = ($urandom % 5) == 0;
        for (int k = 0; k < 8; k++) w1[r][8*p+k] = pruned ? 8'sd0 : 8'($urandom);
      end
    for (int o = 0; o < NOUT; o++)
      for (int p = 0; p < NHID / 8; p++) begin
        automatic bit pruned = (o == 3 && p == 2);
        for (int k = 0; k < 8; k++) w2[o][8*p+k] = pruned ? 8'sd0 : 8'($urandom);
      end
    for (int i = 0; i < NIN; i++) begin
      automatic int row = i / 28, col = i % 28;
      automatic bit in_box = row >= 5 && row < 23 && col >= 8 && col < 20;
      x[i] = (in_box && ($urandom % 3 != 0)) ? 8'($urandom) : 8'd0;
    end
    for (int r = 0; r < NHID; r++) begin
      acc1[r] = 0;
      for (int i = 0; i < NIN; i++) acc1[r] += longint'(x[i]) * longint'(w1[r][i]);
      h_ref[r] = quant(acc1[r], SH1);
      if (acc1[r] < 0) n_relu0++;
      if ((acc1[r] >>> SH1) > 255) n_sat++;
    end
    for (int o = 0; o < NOUT; o++) begin
      acc2[o] = 0;
      for (int j = 0; j < NHID; j++) acc2[o] += longint'(h_ref[j]) * longint'(w2[o][j]);
      if (acc2[o] < 0) n_relu0++;
      if ((acc2[o] >>> SH2) > 255) n_sat++;
    end

    repeat (3) @(negedge pclk);
    presetn = 1;
    // ---- load ----
    for (int p = 0; p < NPE; p++)
      for (int r = 0; r < NHID; r++) write_weight(p, r, w1_slice(r, p));
    for (int p = 0; p < NPE; p++)
      for (int o = 0; o < NOUT; o++) begin
        automatic vec_t v = '0;
        if (p < NHID / 8) for (int k = 0; k < 8; k++) v[8*k +: 8] = w2[o][8*p + k];
        write_weight(p, NHID + o, v);
      end
    for (int p = 0; p < NPE; p++) write_act(p, 0, x_slice(p));
    for (int p = NHID / 8; p < NPE; p++) write_act(p, 1, '0);
    apb(1, 8'h08, SH1, rd, waits);

    // ---- layer 1, filling bank 1 of PEs 0..7 during later passes ----
    for (int r = 0; r < NHID; r++) begin
      // the previous group of 8 hidden values goes to the idle bank (bank 1)
      // while this pass runs from bank 0
      if (r % 8 == 0 && r > 0) begin
        automatic vec_t v;
        for (int k = 0; k < 8; k++) v[8*k +: 8] = h_hw[r - 8 + k];
        set_data(v);
      end
      apb(1, 8'h00, {21'd0, 1'b1, 1'b1, 1'b0, 1'b0, 7'(r)}, rd, waits);
      n_waits += waits;
      exp_passes++;
      for (int p = 0; p < NPE; p++)
        if (w1_slice(r, p) == '0 || x_slice(p) == '0) exp_skipops++;
      if (r % 8 == 0 && r > 0) begin
        apb(1, 8'h18, {9'd0, 7'(r/8 - 1), 15'd0, 1'b1}, rd, waits);
        apb(0, 8'h04, 0, st, pp_waits);
        if (last_data == '0) exp_wskips++;
        if (waits == 0 && st[0]) n_pp_nowait++;
      end
      do apb(0, 8'h04, 0, st, waits); while (st[0]);
      h_hw[r] = st[15:8];
      chk(st[1], "out_valid after layer-1 pass");
      chk(h_hw[r] == h_ref[r], $sformatf("hidden %0d: %0d want %0d", r, h_hw[r], h_ref[r]));
      apb(0, 8'h1C, 0, rd, waits);
      chk($signed(rd) == acc1[r], $sformatf("acc hidden %0d: %0d want %0d", r, $signed(rd), acc1[r]));
    end
    begin
      automatic vec_t v;
      for (int k = 0; k < 8; k++) v[8*k +: 8] = h_hw[NHID - 8 + k];
      write_act(NHID / 8 - 1, 1, v);
    end

    // ---- layer 2 ----
    apb(1, 8'h08, SH2, rd, waits);
    for (int o = 0; o < NOUT; o++) begin
      automatic logic [7:0] want = quant(acc2[o], SH2);
      for (int p = 0; p < NPE; p++)
        if (p >= NHID / 8 || w2_zero(o, p) || h_zero(p)) exp_skipops++;
      run_pass(NHID + o, 1, 1'b1, 1'b1, st);
      chk(st[15:8] == want, $sformatf("output %0d: %0d want %0d", o, st[15:8], want));
      apb(0, 8'h1C, 0, rd, waits);
      chk($signed(rd) == acc2[o], $sformatf("acc output %0d: %0d want %0d", o, $signed(rd), acc2[o]));
    end

    // ---- two back-to-back passes accumulate the same row twice ----
    apb(1, 8'h00, {21'd0, 1'b0, 1'b1, 1'b1, 1'b0, 7'(NHID)}, rd, waits);
    n_waits += waits;
    run_pass(NHID, 1, 1'b0, 1'b1, st);
    exp_passes++;
    for (int rep = 0; rep < 2; rep++)
      for (int p = 0; p < NPE; p++)
        if (p >= NHID / 8 || w2_zero(0, p) || h_zero(p)) exp_skipops++;
    apb(0, 8'h1C, 0, rd, waits);
    chk($signed(rd) == 2 * acc2[0], $sformatf("two-pass acc %0d want %0d", $signed(rd), 2 * acc2[0]));
    chk(st[15:8] == quant(2 * acc2[0], SH2), "two-pass output");
    if ($signed(rd) == 2 * acc2[0]) n_multipass++;

    // ---- counters and mechanisms ----
    apb(0, 8'h20, 0, rd, waits); chk(rd == exp_passes,  $sformatf("PASSES %0d want %0d", rd, exp_passes));
    apb(0, 8'h24, 0, rd, waits); chk(rd == exp_skipops, $sformatf("SKIPOPS %0d want %0d", rd, exp_skipops));
    apb(0, 8'h28, 0, rd, waits); chk(rd == exp_wskips,  $sformatf("WSKIPS %0d want %0d", rd, exp_wskips));
    apb(0, 8'h2C, 0, rd, waits); chk(rd > 0 && n_waits > 0, $sformatf("wait states %0d", rd));
    $display("mechanisms: write-skips %0d, PE skips %0d of %0d, ping-pong writes while busy %0d,",
             exp_wskips, exp_skipops, exp_passes * NPE, n_pp_nowait);
    $display("            wait states %0d, ReLU clamps %0d, saturations %0d, multi-pass %0d",
             n_waits, n_relu0, n_sat, n_multipass);
    chk(exp_wskips > 0,  "write skipping occurred");
    chk(exp_skipops > 0, "read/calculation skipping occurred");
    chk(n_pp_nowait > 0, "ping-pong write during a pass occurred");
    chk(n_waits > 0,     "wait state occurred");
    chk(n_relu0 > 0,     "ReLU clamp occurred");
    chk(n_sat > 0,       "saturation occurred");
    chk(n_multipass > 0, "multi-pass accumulation occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
