// tsnmc_top -- triple-skipping near-MRAM computing (TS-NMC) accelerator as an
// APB peripheral of a microcontroller.
//
// The host writes weight vectors into the MRAM core arrays and activation
// vectors into the ping-pong MRAM buffers of N_PE processing elements
// through the register interface (tsnmc_apb_regs), then runs passes of the
// MAC engine (mac_engine): each pass forms one dot product of length
// N_PE*8 from one core-array row of every PE, adds it into the partial sum
// accumulator and, on the last pass of an output, applies ReLU and 8-bit
// quantization. All-zero vectors are skipped at write, read and
// calculation. The register map and timing are described in
// tsnmc_apb_regs and mac_engine.
//
// N_PE defaults to 98 so that a 784-input fully connected layer (a 28x28
// image) fits one 8-element slice per PE; the paper does not give the
// number of PEs.
module tsnmc_top
  import tsnmc_pkg::*;
#(
  parameter int unsigned N_PE = 98
) (
  input  logic        pclk,
  input  logic        presetn,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [7:0]  paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr
);

  localparam int unsigned AW = $clog2(CORE_ROWS * CORE_SUBS);
  localparam int unsigned PW = (N_PE > 1) ? $clog2(N_PE) : 1;
  localparam int unsigned CW = $clog2(N_PE + 1);

  logic                    w_we, a_we, a_bank, w_wr_skip, a_wr_skip;
  logic [PW-1:0]           w_pe, a_pe;
  logic [AW-1:0]           w_addr, row_addr;
  vec_t                    wr_data;
  logic                    start, bank, first, last, busy, cur_bank, done, out_valid;
  logic [4:0]              shift;
  logic [CW-1:0]           pass_skips;
  logic signed [ACC_W-1:0] acc;
  logic [DATA_W-1:0]       out_act;

  tsnmc_apb_regs #(.N_PE(N_PE), .ROWS(CORE_ROWS), .SUBS(CORE_SUBS)) u_regs (
    .pclk, .presetn, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .w_we, .w_pe, .w_addr, .wr_data, .w_wr_skip,
    .a_we, .a_pe, .a_bank, .a_wr_skip,
    .start, .row_addr, .bank, .first, .last, .shift,
    .busy, .cur_bank, .done, .pass_skips, .acc, .out_valid, .out_act
  );

  mac_engine #(.N_PE(N_PE), .ROWS(CORE_ROWS), .SUBS(CORE_SUBS)) u_engine (
    .clk(pclk), .rst_n(presetn),
    .w_we, .w_pe, .w_addr, .w_data(wr_data), .w_wr_skip,
    .a_we, .a_pe, .a_bank, .a_data(wr_data), .a_wr_skip,
    .start, .row_addr, .bank, .first, .last, .shift,
    .busy, .cur_bank, .done, .pass_skips, .acc, .out_valid, .out_act
  );

endmodule
