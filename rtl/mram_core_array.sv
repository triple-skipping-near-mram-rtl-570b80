// mram_core_array -- STT-MRAM weight array of one NMC processing element,
// with its sparse-flag column, word-line driver and gated sense amplifiers.
//
// Each word is one weight vector (VEC_W data bits) plus one sparse-flag bit.
// There are ROWS rows in each of SUBS sub-arrays that share the peripheral
// circuits; the address is {sub-array, row}. The flag bit is stored in an
// extra column at the end of the row, as in the paper's 64x65x2 layout.
//
// Write skipping: a write presents the data together with its sparse flag.
// When wflag is 1 (the vector is all zero) only the flag column is written
// and the data columns keep whatever they held; when wflag is 0 both are
// written. wr_data_en reports whether the data write drivers fired.
//
// Read: the flag sense amplifier and the data sense amplifiers are enabled
// separately (sae_flag, sae_data). Each sense amplifier latches its result
// at the clock edge that ends its enable cycle and holds it while disabled,
// so flag_q and data_q keep their value across cycles in which sensing is
// skipped. The sense amplifier latches are the PE's D_in register.
//
// Behaviour of the 2T-2MTJ cells (differential, self-referenced read) is
// reduced to a stored bit; the non-volatile array is not reset. Write and
// read each take one cycle; that single-cycle timing is this design's choice.
module mram_core_array
  import tsnmc_pkg::*;
#(
  parameter int unsigned DATA_BITS = VEC_W,
  parameter int unsigned ROWS      = CORE_ROWS,
  parameter int unsigned SUBS      = CORE_SUBS,
  localparam int unsigned DEPTH    = ROWS * SUBS,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // write port
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic [DATA_BITS-1:0] wdata,
  input  logic                 wflag,
  output logic                 wr_data_en,
  // read port
  input  logic [AW-1:0]        raddr,
  input  logic                 sae_flag,
  input  logic                 sae_data,
  output logic                 flag_q,
  output logic [DATA_BITS-1:0] data_q
);

  logic [DATA_BITS-1:0] data_mem [DEPTH];
  logic                 flag_mem [DEPTH];

  assign wr_data_en = we && !wflag;

  always_ff @(posedge clk) begin
    if (we)         flag_mem[waddr] <= wflag;
    if (wr_data_en) data_mem[waddr] <= wdata;
  end

  // Sense amplifier output latches.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_q <= 1'b0;
      data_q <= '0;
    end else begin
      if (sae_flag) flag_q <= flag_mem[raddr];
      if (sae_data) data_q <= data_mem[raddr];
    end
  end

endmodule
