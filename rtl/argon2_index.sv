// argon2_index: the Argon2 indexing function. Maps the pseudo-random
// 64-bit value of the current block (J1 = low 32 bits, J2 = high 32 bits)
// to the reference block B[ref_lane][ref_col].
//
// ref_lane = J2 mod p, except in the first slice of the first pass, where
// it is the current lane. The reference area W is the set of blocks
// already finished that may be referenced: in pass 0 the blocks of the
// current lane before the current one, or, in another lane, the completed
// slices; in later passes the last three slices (less the current block).
// The position in W is non-uniform:
//   x = J1^2 / 2^32,  y = |W| * x / 2^32,  rel = |W| - 1 - y,
// counted from the start of the slice after the current one (or from 0 in
// pass 0 and in slice 3), modulo the lane length q. The rules for W follow
// the Argon2 specification the description refers to.
//
// Timing: start_i samples all inputs. J2 mod p is found by a 32-step
// restoring division, one bit per cycle, since p may be any value up to
// 2^24 - 1; one more cycle computes the column. done_o pulses 34 cycles
// after start_i, with ref_lane_o and ref_col_o valid from then on. The
// serial divider is a choice of this design.
module argon2_index (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        start_i,
  input  logic [63:0] pseudo_i,
  input  logic [31:0] pass_i,
  input  logic [1:0]  slice_i,
  input  logic [31:0] lane_i,
  input  logic [31:0] index_i,    // position inside the segment
  input  logic [31:0] lanes_i,    // p
  input  logic [31:0] seglen_i,   // q / 4
  input  logic [31:0] q_i,        // blocks per lane
  output logic        done_o,
  output logic [31:0] ref_lane_o,
  output logic [31:0] ref_col_o
);
  typedef enum logic [1:0] {S_IDLE, S_DIV, S_MAP} state_e;

  state_e      state_q;
  logic [63:0] pr_q;
  logic [31:0] pass_q, lane_q, index_q, lanes_q, seglen_q, q_q;
  logic [1:0]  slice_q;
  logic [32:0] rem_q;
  logic [5:0]  bit_q;

  // restoring division step
  logic [32:0] rem_sh;
  always_comb rem_sh = {rem_q[31:0], pr_q[32 + bit_q[4:0]]};

  // mapping of J1 to a column, from the registered operands
  logic [31:0] rlane, area, rel, start_pos, abs_col;
  logic        same;
  logic [63:0] xsq, ywide;
  logic [32:0] sum;
  always_comb begin
    rlane = (pass_q == 0 && slice_q == 2'd0) ? lane_q : rem_q[31:0];
    same  = (rlane == lane_q);
    if (pass_q == 0) begin
      if (slice_q == 2'd0)  area = index_q - 32'd1;
      else if (same)        area = 32'(slice_q) * seglen_q + index_q - 32'd1;
      else                  area = 32'(slice_q) * seglen_q - ((index_q == 0) ? 32'd1 : 32'd0);
    end else begin
      if (same)             area = q_q - seglen_q + index_q - 32'd1;
      else                  area = q_q - seglen_q - ((index_q == 0) ? 32'd1 : 32'd0);
    end
    xsq       = 64'(pr_q[31:0]) * 64'(pr_q[31:0]);
    ywide     = 64'(area) * 64'(xsq[63:32]);
    rel       = area - 32'd1 - ywide[63:32];
    start_pos = (pass_q != 0 && slice_q != 2'd3) ? (32'(slice_q) + 32'd1) * seglen_q : 32'd0;
    sum       = 33'(start_pos) + 33'(rel);
    abs_col   = (sum >= 33'(q_q)) ? 32'(sum - 33'(q_q)) : sum[31:0];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      pr_q <= '0; pass_q <= '0; lane_q <= '0; index_q <= '0;
      lanes_q <= '0; seglen_q <= '0; q_q <= '0; slice_q <= '0;
      rem_q <= '0; bit_q <= '0;
      done_o <= 1'b0; ref_lane_o <= '0; ref_col_o <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start_i) begin
          pr_q <= pseudo_i; pass_q <= pass_i; slice_q <= slice_i; lane_q <= lane_i;
          index_q <= index_i; lanes_q <= lanes_i; seglen_q <= seglen_i; q_q <= q_i;
          rem_q   <= '0;
          bit_q   <= 6'd31;
          state_q <= S_DIV;
        end
        S_DIV: begin
          rem_q <= (rem_sh >= 33'(lanes_q)) ? rem_sh - 33'(lanes_q) : rem_sh;
          bit_q <= bit_q - 6'd1;
          if (bit_q == 6'd0) state_q <= S_MAP;
        end
        S_MAP: begin
          ref_lane_o <= rlane;
          ref_col_o  <= abs_col;
          done_o     <= 1'b1;
          state_q    <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
