// tsnmc_apb_regs -- AMBA APB slave through which the host processor loads
// weights and activations into the TS-NMC engine, starts passes and reads
// results.
//
// Register map (byte addresses, 32-bit registers):
//   0x00 CMD     W: start a pass. [AW-1:0] core row, [8] buffer bank,
//                   [9] first pass (clear accumulator), [10] last pass
//                   (apply ReLU + quantization). R: last command written.
//   0x04 STATUS  R: [0] busy, [1] out_valid, [15:8] out_act, [16] bank in use
//   0x08 SHIFT   RW: [4:0] quantization shift
//   0x0C DLO     RW: bits 31:0 of the 64-bit write data
//   0x10 DHI     RW: bits 63:32 of the 64-bit write data
//   0x14 WCMD    W: write {DHI,DLO} to weight row [AW-1:0] of PE [PW+15:16]
//   0x18 ACMD    W: write {DHI,DLO} to activation bank [0] of PE [PW+15:16]
//   0x1C ACC     R: raw accumulator (signed)
//   0x20 PASSES  R: passes completed
//   0x24 SKIPOPS R: PE operations that skipped sensing and calculation
//   0x28 WSKIPS  R: vector writes whose data cells were skipped
//   0x2C WAITS   R: wait states inserted
// Other addresses answer with PSLVERR.
//
// Wait states: a write to CMD or WCMD, or to ACMD for the bank in use, is
// held with PREADY=0 while the engine is busy. An ACMD write to the other
// bank completes at once, so the next activation vector can be loaded while
// the current pass runs (ping-pong). The command takes effect in the access
// cycle in which PREADY is 1. The register map, the wait-state rule and the
// statistics counters are this design's; the paper only says the engine
// is attached to the processor through AMBA.
module tsnmc_apb_regs
  import tsnmc_pkg::*;
#(
  parameter int unsigned N_PE = 98,
  parameter int unsigned ROWS = CORE_ROWS,
  parameter int unsigned SUBS = CORE_SUBS,
  localparam int unsigned AW  = $clog2(ROWS * SUBS),
  localparam int unsigned PW  = (N_PE > 1) ? $clog2(N_PE) : 1,
  localparam int unsigned CW  = $clog2(N_PE + 1)
) (
  input  logic                    pclk,
  input  logic                    presetn,
  input  logic                    psel,
  input  logic                    penable,
  input  logic                    pwrite,
  input  logic [7:0]              paddr,
  input  logic [31:0]             pwdata,
  output logic [31:0]             prdata,
  output logic                    pready,
  output logic                    pslverr,
  // engine side
  output logic                    w_we,
  output logic [PW-1:0]           w_pe,
  output logic [AW-1:0]           w_addr,
  output vec_t                    wr_data,
  input  logic                    w_wr_skip,
  output logic                    a_we,
  output logic [PW-1:0]           a_pe,
  output logic                    a_bank,
  input  logic                    a_wr_skip,
  output logic                    start,
  output logic [AW-1:0]           row_addr,
  output logic                    bank,
  output logic                    first,
  output logic                    last,
  output logic [4:0]              shift,
  input  logic                    busy,
  input  logic                    cur_bank,
  input  logic                    done,
  input  logic [CW-1:0]           pass_skips,
  input  logic signed [ACC_W-1:0] acc,
  input  logic                    out_valid,
  input  logic [DATA_W-1:0]       out_act
);

  localparam logic [7:0] A_CMD = 8'h00, A_STATUS = 8'h04, A_SHIFT = 8'h08,
                         A_DLO = 8'h0C, A_DHI = 8'h10, A_WCMD = 8'h14,
                         A_ACMD = 8'h18, A_ACC = 8'h1C, A_PASSES = 8'h20,
                         A_SKIPOPS = 8'h24, A_WSKIPS = 8'h28, A_WAITS = 8'h2C;

  logic [31:0] cmd_r, dlo_r, dhi_r, passes_r, skipops_r, wskips_r, waits_r;
  logic [4:0]  shift_r;
  logic        access, wr, hold, known;

  assign access = psel && penable;
  assign wr     = access && pwrite;

  always_comb begin
    hold = 1'b0;
    if (wr && busy) begin
      if (paddr == A_CMD || paddr == A_WCMD)      hold = 1'b1;
      if (paddr == A_ACMD && pwdata[0] == cur_bank) hold = 1'b1;
    end
  end

  always_comb begin
    unique case (paddr)
      A_CMD, A_STATUS, A_SHIFT, A_DLO, A_DHI, A_WCMD, A_ACMD, A_ACC,
      A_PASSES, A_SKIPOPS, A_WSKIPS, A_WAITS: known = 1'b1;
      default: known = 1'b0;
    endcase
  end

  assign pready  = !hold;
  assign pslverr = access && !known;

  // Engine commands, issued in the completing access cycle.
  assign wr_data  = {dhi_r, dlo_r};
  assign start    = wr && !hold && (paddr == A_CMD);
  assign row_addr = pwdata[AW-1:0];
  assign bank     = pwdata[8];
  assign first    = pwdata[9];
  assign last     = pwdata[10];
  assign shift    = shift_r;
  assign w_we     = wr && !hold && (paddr == A_WCMD);
  assign w_pe     = pwdata[16 +: PW];
  assign w_addr   = pwdata[AW-1:0];
  assign a_we     = wr && !hold && (paddr == A_ACMD);
  assign a_pe     = pwdata[16 +: PW];
  assign a_bank   = pwdata[0];

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      cmd_r     <= '0;
      dlo_r     <= '0;
      dhi_r     <= '0;
      shift_r   <= '0;
      passes_r  <= '0;
      skipops_r <= '0;
      wskips_r  <= '0;
      waits_r   <= '0;
    end else begin
      if (wr && !hold) begin
        unique case (paddr)
          A_CMD:   cmd_r   <= pwdata;
          A_SHIFT: shift_r <= pwdata[4:0];
          A_DLO:   dlo_r   <= pwdata;
          A_DHI:   dhi_r   <= pwdata;
          default: ;
        endcase
      end
      if (hold) waits_r <= waits_r + 1;
      if (done) begin
        passes_r  <= passes_r + 1;
        skipops_r <= skipops_r + 32'(pass_skips);
      end
      if (w_wr_skip || a_wr_skip) wskips_r <= wskips_r + 1;
    end
  end

  always_comb begin
    prdata = '0;
    if (access && !pwrite) begin
      unique case (paddr)
        A_CMD:     prdata = cmd_r;
        A_STATUS:  prdata = {15'd0, cur_bank, out_act, 6'd0, out_valid, busy};
        A_SHIFT:   prdata = {27'd0, shift_r};
        A_DLO:     prdata = dlo_r;
        A_DHI:     prdata = dhi_r;
        A_ACC:     prdata = acc;
        A_PASSES:  prdata = passes_r;
        A_SKIPOPS: prdata = skipops_r;
        A_WSKIPS:  prdata = wskips_r;
        A_WAITS:   prdata = waits_r;
        default:   prdata = '0;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_penable_psel: assert property (@(posedge pclk) disable iff (!presetn) penable |-> psel)
    else $error("APB: PENABLE without PSEL");
  a_stable: assert property (@(posedge pclk) disable iff (!presetn)
                             (access && !pready) |=> (psel && penable && $stable(paddr) &&
                                                      $stable(pwrite) && $stable(pwdata)))
    else $error("APB: transfer changed during wait state");
`endif

endmodule
