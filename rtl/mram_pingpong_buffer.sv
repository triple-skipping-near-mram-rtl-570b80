// mram_pingpong_buffer -- two-bank STT-MRAM activation buffer of one NMC
// processing element, stored bit-plane by bit-plane.
//
// A vector of ELEMS activations, ELEM_W bits each, is stored transposed:
// row m of a bank holds bit m of every element, i_m = (a_0[m] .. a_{ELEMS-1}[m]),
// followed by one sparse-flag cell. A bank is therefore ELEM_W rows of
// ELEMS+1 cells (8 x 9 in the paper), and there are two banks, so the
// host can fill one bank while the PE computes from the other.
//
// Write (one cycle, all rows of a bank at once): the flag cell of every row
// of bank wbank takes wflag. The data cells are written only when wflag is 0
// (write skipping); wr_data_en reports that. Writing all rows in one cycle
// is this design's choice.
//
// Read: sae_flag senses the flag cell of row rrow of bank rbank; sae_data
// senses the ELEMS data cells of that row. Each sense amplifier latches at
// the edge ending its enable cycle and holds its value while disabled, so
// plane_q is the PE's "input" register.
module mram_pingpong_buffer
  import tsnmc_pkg::*;
#(
  parameter int unsigned ELEMS  = VEC_LEN,
  parameter int unsigned ELEM_W = DATA_W,
  parameter int unsigned BANKS  = BUF_BANKS,
  localparam int unsigned BW    = (BANKS > 1) ? $clog2(BANKS) : 1,
  localparam int unsigned RW    = (ELEM_W > 1) ? $clog2(ELEM_W) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write port: one whole vector, element k in bits [ELEM_W*k +: ELEM_W]
  input  logic                     we,
  input  logic [BW-1:0]            wbank,
  input  logic [ELEMS*ELEM_W-1:0]  wdata,
  input  logic                     wflag,
  output logic                     wr_data_en,
  // read port: one bit-plane
  input  logic [BW-1:0]            rbank,
  input  logic [RW-1:0]            rrow,
  input  logic                     sae_flag,
  input  logic                     sae_data,
  output logic                     flag_q,
  output logic [ELEMS-1:0]         plane_q
);

  logic [ELEMS-1:0] data_mem [BANKS][ELEM_W];
  logic             flag_mem [BANKS][ELEM_W];

  assign wr_data_en = we && !wflag;

  always_ff @(posedge clk) begin
    for (int m = 0; m < ELEM_W; m++) begin
      if (we) flag_mem[wbank][m] <= wflag;
      if (wr_data_en)
        for (int k = 0; k < ELEMS; k++) data_mem[wbank][m][k] <= wdata[ELEM_W*k + m];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_q  <= 1'b0;
      plane_q <= '0;
    end else begin
      if (sae_flag) flag_q  <= flag_mem[rbank][rrow];
      if (sae_data) plane_q <= data_mem[rbank][rrow];
    end
  end

endmodule
