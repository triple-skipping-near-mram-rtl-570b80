// sparse_flag_gen -- sparse flag of an N_BITS-wide data word.
//
// The flag is 1 when every bit of the word is 0 and 0 otherwise, so one
// extra MRAM column can tell later reads whether the word needs to be
// written, sensed or multiplied at all. The structure is the paper's
// pairwise reduction: at each level neighbouring bits 2i and 2i+1 are ORed;
// when a level has an odd number of bits the last one passes through
// unchanged. Levels repeat until two bits remain, and a single NOR of those
// two gives the flag. An N_BITS-bit word therefore costs N_BITS-2 two-input
// OR gates and one two-input NOR gate (62 OR + 1 NOR for the 64-bit weight
// or activation vector).
//
// Purely combinational: flag follows data in the same cycle.
module sparse_flag_gen #(
  parameter int unsigned N_BITS = 64
) (
  input  logic [N_BITS-1:0] data,
  output logic              flag
);

  // Width of reduction level l: each level halves the width, rounding up.
  function automatic int unsigned width_at(int unsigned l);
    int unsigned w = N_BITS;
    for (int unsigned s = 0; s < l; s++) w = (w + 1) / 2;
    return w;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned l = 0;
    while (width_at(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  if (N_BITS < 2) begin : g_bad
    $error("sparse_flag_gen: N_BITS must be at least 2");
  end

  // lv[l] holds the width_at(l) live bits of level l.
  logic [N_BITS-1:0] lv [LEVELS+1];

  assign lv[0] = data;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned WI = width_at(l);
    localparam int unsigned WO = width_at(l + 1);
    for (genvar i = 0; i < WI / 2; i++) begin : g_or
      assign lv[l+1][i] = lv[l][2*i] | lv[l][2*i+1];
    end
    if (WI % 2 == 1) begin : g_pass
      assign lv[l+1][WO-1] = lv[l][WI-1];
    end
    if (WO < N_BITS) begin : g_tie
      assign lv[l+1][N_BITS-1:WO] = '0;   // unused upper positions
    end
  end

  assign flag = ~(lv[LEVELS][0] | lv[LEVELS][1]);

endmodule
