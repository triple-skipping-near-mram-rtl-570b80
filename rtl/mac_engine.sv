// mac_engine -- N_PE near-MRAM processing elements working in parallel,
// followed by the partial sum accumulator with ReLU and 8-bit quantization.
//
// A long dot product of length N_PE*VEC_LEN is split into N_PE slices of
// VEC_LEN elements, one per PE. On start every PE computes its slice for
// the same core-array row (row_addr) and buffer bank (bank); each PE skips
// the sensing and the arithmetic on its own when its weight slice or its
// activation slice is all zero. When every PE has finished, the PE results
// are summed and added into the accumulator: with first=1 the accumulator
// starts from 0, otherwise it keeps adding, so a dot product longer than
// the engine can be taken in several passes. With last=1 the new
// accumulator value is also passed through ReLU and quantized to 8 bits:
//     out_act = min(255, max(0, acc) >> shift)
// and out_valid is raised until the next start.
//
// Writes: w_we writes weight row w_addr of PE w_pe; a_we writes the
// activation vector of bank a_bank of PE a_pe. Each write passes through
// that PE's sparse flag generator (write skipping). A write to an
// activation bank that is not the one in use may happen while busy (the
// ping-pong use of the buffer); the caller keeps weight writes and writes
// to the bank in use out of a busy pass.
//
// Timing: start is accepted while busy is 0. done pulses 13 cycles after the
// start cycle if any PE computed and 5 cycles after it if every PE skipped.
// pass_skips (the number of PEs that skipped) is valid with done.
//
// The PE array and the accumulator follow the paper; the pass control,
// the shift-based quantizer and the multi-pass accumulation are this
// design's reading of "ReLU and 8-bit quantification embedded in the
// partial sum accumulate".
module mac_engine
  import tsnmc_pkg::*;
#(
  parameter int unsigned N_PE = 98,
  parameter int unsigned ROWS = CORE_ROWS,
  parameter int unsigned SUBS = CORE_SUBS,
  localparam int unsigned AW  = $clog2(ROWS * SUBS),
  localparam int unsigned PW  = (N_PE > 1) ? $clog2(N_PE) : 1,
  localparam int unsigned CW  = $clog2(N_PE + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // writes
  input  logic                    w_we,
  input  logic [PW-1:0]           w_pe,
  input  logic [AW-1:0]           w_addr,
  input  vec_t                    w_data,
  output logic                    w_wr_skip,
  input  logic                    a_we,
  input  logic [PW-1:0]           a_pe,
  input  logic                    a_bank,
  input  vec_t                    a_data,
  output logic                    a_wr_skip,
  // pass control
  input  logic                    start,
  input  logic [AW-1:0]           row_addr,
  input  logic                    bank,
  input  logic                    first,
  input  logic                    last,
  input  logic [4:0]              shift,
  output logic                    busy,
  output logic                    cur_bank,
  output logic                    done,
  output logic [CW-1:0]           pass_skips,
  output logic signed [ACC_W-1:0] acc,
  output logic                    out_valid,
  output logic [DATA_W-1:0]       out_act
);

  typedef enum logic [1:0] {E_IDLE, E_RUN, E_ACC} estate_e;
  estate_e state;

  logic        first_r, last_r;
  logic [4:0]  shift_r;
  logic        pe_start;

  logic [N_PE-1:0] pe_busy, pe_skip, pe_wskip, pe_askip;
  psum_t           pe_res [N_PE];

  assign pe_start = start && (state == E_IDLE);

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    nmc_pe #(.ROWS(ROWS), .SUBS(SUBS)) u_pe (
      .clk, .rst_n,
      .w_we(w_we && (w_pe == PW'(p))), .w_addr(w_addr), .w_data(w_data), .w_wr_skip(pe_wskip[p]),
      .a_we(a_we && (a_pe == PW'(p))), .a_bank(a_bank), .a_data(a_data), .a_wr_skip(pe_askip[p]),
      .start(pe_start), .row_addr(row_addr), .bank(bank),
      .busy(pe_busy[p]), .done(), .skipped(pe_skip[p]), .result(pe_res[p])
    );
  end

  assign w_wr_skip = |pe_wskip;
  assign a_wr_skip = |pe_askip;

  // Sum of all PE results and count of skipping PEs.
  logic signed [ACC_W-1:0] pe_sum, acc_next, relu;
  logic [CW-1:0]           skip_cnt;

  always_comb begin
    pe_sum   = '0;
    skip_cnt = '0;
    for (int p = 0; p < N_PE; p++) begin
      pe_sum   = pe_sum + ACC_W'(pe_res[p]);
      skip_cnt = skip_cnt + CW'(pe_skip[p]);
    end
    acc_next = (first_r ? '0 : acc) + pe_sum;
    relu     = (acc_next < 0) ? '0 : (acc_next >>> shift_r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= E_IDLE;
      first_r    <= 1'b0;
      last_r     <= 1'b0;
      shift_r    <= '0;
      cur_bank   <= 1'b0;
      done       <= 1'b0;
      pass_skips <= '0;
      acc        <= '0;
      out_valid  <= 1'b0;
      out_act    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        E_IDLE: if (start) begin
          first_r   <= first;
          last_r    <= last;
          shift_r   <= shift;
          cur_bank  <= bank;
          out_valid <= 1'b0;
          state     <= E_RUN;
        end
        E_RUN: if (!(|pe_busy)) state <= E_ACC;
        E_ACC: begin
          acc        <= acc_next;
          pass_skips <= skip_cnt;
          done       <= 1'b1;
          if (last_r) begin
            out_valid <= 1'b1;
            out_act   <= (relu > ACC_W'(255)) ? 8'd255 : relu[DATA_W-1:0];
          end
          state <= E_IDLE;
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  assign busy = (state != E_IDLE);

endmodule
