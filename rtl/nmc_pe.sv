// nmc_pe -- sparsity-aware near-memory-computing processing element with
// write, read and calculation skipping ("triple skipping").
//
// Contents: an MRAM core array holding weight vectors (one vector per row
// plus a sparse-flag column), a two-bank MRAM buffer holding an activation
// vector bit-plane by bit-plane, one sparse flag generator in front of each
// memory's write port, the shift adder tree, and the sequencing below.
//
// Write skipping: every write goes through a sparse flag generator; an
// all-zero vector only writes its flag cell.
//
// Operation (start pulse with row_addr and bank; start is accepted only
// while busy is 0):
//   cycle FLAG  both flag sense amplifiers read the flag of the weight row
//               and of the activation bank. flag = f_w | f_i.
//   cycle DATA  if flag is 1 the vector product is 0: no data is sensed,
//               the D_in, input and psum registers keep their values, and
//               the operation ends (read and calculation skipping). The
//               result output is forced to 0 by AND gating.
//               Otherwise the weight sense amplifiers read the whole row
//               into D_in and the buffer senses bit-plane 7; psum <= 0.
//   CALC x8     the weight sense amplifiers stay off and hold D_in. Each
//               cycle the shift adder tree forms S = sum_k i_m[k]&w_k +
//               (psum<<1) for the current plane m (7 down to 0); at the
//               edge psum <= S and the buffer delivers plane m-1.
// done is a one-cycle pulse: DONE_LAT_NZ = 11 cycles after the start cycle
// for a computed product, DONE_LAT_Z = 3 cycles for a skipped one.
// result and skipped are valid from done until the next start.
//
// The order of the steps follows the paper's timing diagram; the
// registered done pulse and the ready/start handshake are this design's.
module nmc_pe
  import tsnmc_pkg::*;
#(
  parameter int unsigned ROWS = CORE_ROWS,
  parameter int unsigned SUBS = CORE_SUBS,
  localparam int unsigned AW  = $clog2(ROWS * SUBS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // weight write (row of the core array)
  input  logic          w_we,
  input  logic [AW-1:0] w_addr,
  input  vec_t          w_data,
  output logic          w_wr_skip,    // pulse: data columns not written
  // activation write (one bank of the ping-pong buffer)
  input  logic          a_we,
  input  logic          a_bank,
  input  vec_t          a_data,
  output logic          a_wr_skip,    // pulse: data cells not written
  // operation
  input  logic          start,
  input  logic [AW-1:0] row_addr,
  input  logic          bank,
  output logic          busy,
  output logic          done,
  output logic          skipped,
  output psum_t         result
);

  localparam int unsigned MW = $clog2(DATA_W);
  localparam logic [MW-1:0] TOP_PLANE = MW'(DATA_W - 1);

  typedef enum logic [1:0] {S_IDLE, S_FLAG, S_DATA, S_CALC} state_e;
  state_e state;

  logic [AW-1:0] row_r;
  logic          bank_r;
  logic [MW-1:0] m_r;         // plane being accumulated in S_CALC
  psum_t         psum_r;
  logic          done_r;

  // ---------------- write path with sparse flag generation ----------------
  logic w_flag, a_flag;

  sparse_flag_gen #(.N_BITS(VEC_W)) u_flag_w (.data(w_data), .flag(w_flag));
  sparse_flag_gen #(.N_BITS(VEC_W)) u_flag_a (.data(a_data), .flag(a_flag));

  logic w_data_en, a_data_en;
  assign w_wr_skip = w_we && !w_data_en;
  assign a_wr_skip = a_we && !a_data_en;

  // ---------------- memories ----------------
  logic          f_w, f_i;        // sensed flags
  vec_t          din;             // sensed weight row (D_in)
  plane_t        plane;           // sensed activation bit-plane (input)
  logic          flag;
  logic          sae_flag, sae_w, sae_i;
  logic [MW-1:0] rrow;

  assign flag = f_w | f_i;

  always_comb begin
    sae_flag = (state == S_FLAG);
    sae_w    = (state == S_DATA) && !flag;
    sae_i    = ((state == S_DATA) && !flag) || ((state == S_CALC) && (m_r != '0));
    rrow     = (state == S_CALC) ? m_r - 1'b1 : TOP_PLANE;
  end

  mram_core_array #(.DATA_BITS(VEC_W), .ROWS(ROWS), .SUBS(SUBS)) u_core (
    .clk, .rst_n,
    .we(w_we), .waddr(w_addr), .wdata(w_data), .wflag(w_flag), .wr_data_en(w_data_en),
    .raddr(row_r), .sae_flag(sae_flag), .sae_data(sae_w),
    .flag_q(f_w), .data_q(din)
  );

  mram_pingpong_buffer #(.ELEMS(VEC_LEN), .ELEM_W(DATA_W), .BANKS(BUF_BANKS)) u_buf (
    .clk, .rst_n,
    .we(a_we), .wbank(a_bank), .wdata(a_data), .wflag(a_flag), .wr_data_en(a_data_en),
    .rbank(bank_r), .rrow(rrow), .sae_flag(sae_flag), .sae_data(sae_i),
    .flag_q(f_i), .plane_q(plane)
  );

  // ---------------- shift adder tree ----------------
  psum_t sat_out;

  shift_adder_tree #(.ELEMS(VEC_LEN), .W_W(DATA_W), .OUT_W(PSUM_W)) u_sat (
    .plane(plane), .weights(din), .psum_in(psum_r), .zero_out(flag), .sum_out(sat_out)
  );

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      row_r  <= '0;
      bank_r <= 1'b0;
      m_r    <= '0;
      psum_r <= '0;
      done_r <= 1'b0;
    end else begin
      done_r <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          row_r  <= row_addr;
          bank_r <= bank;
          state  <= S_FLAG;
        end
        S_FLAG: state <= S_DATA;
        S_DATA: begin
          if (flag) begin
            done_r <= 1'b1;          // skip: nothing else switches
            state  <= S_IDLE;
          end else begin
            psum_r <= '0;
            m_r    <= TOP_PLANE;
            state  <= S_CALC;
          end
        end
        S_CALC: begin
          psum_r <= sat_out;
          m_r    <= m_r - 1'b1;
          if (m_r == '0) begin
            done_r <= 1'b1;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign done    = done_r;
  assign skipped = flag;
  assign result  = flag ? '0 : psum_r;     // AND gating of the skipped result

`ifndef SYNTHESIS
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("nmc_pe: start while busy");
`endif

endmodule
