// argon2id: Argon2 password hashing core (Argon2id by default; type 0 gives
// Argon2d and type 1 Argon2i).
//
// Operation. valid_i latches the password P, salt (nonce) S, secret key K,
// associated data X, their byte lengths, and the parameters p (lanes), T
// (tag bytes), m (memory in KiB), t (passes), v (version) and y (type).
// The core then
//   1. hashes the parameter buffer into the 64-byte H0 (BLAKE2b);
//   2. fills the first two blocks of every lane with H'(1024, H0 || j || l);
//   3. computes every other block as G(previous block, reference block),
//      slice by slice and lane by lane, for t passes; from pass 1 on the new
//      block is xored into the old one. The reference block comes from the
//      indexing function, fed either by the first word of the previous
//      block (data-dependent) or by address blocks G(0, G(0, Z)) built from
//      the position (data-independent; Argon2id uses these in the first two
//      slices of pass 0);
//   4. xors the last block of all lanes into C and outputs the tag
//      H'(T, C).
// The memory holds m' = 4p * floor(max(m, 8p) / 4p) blocks, at most
// MAX_BLOCKS. One compression unit and one BLAKE2b unit are shared by all
// steps, and the lanes are processed one after another; the lanes of a
// slice do not depend on each other, so the order does not change the
// result.
//
// Interface. Strings are left-aligned on their ports: byte 0 is the most
// significant byte. tag_o holds the tag the same way (bytes beyond T are
// zero) from the cycle valid_o pulses until the next valid_i. error_o is
// set together with valid_o, and no hash is computed, when a parameter is
// out of the range this instance supports (p = 0, t = 0, y > 2, T < 4 or
// T > TAG_BYTES, |S| < 8, a string longer than its port, or a memory
// larger than MAX_BLOCKS). compressed_ready_o pulses once for every memory block
// the compression function finishes. busy_o is high from valid_i to
// valid_o; valid_i is ignored while busy.
//
// Timing: for p = 4, m = 32, t = 3 a hash takes about 62,000 cycles; see
// the README for the breakdown. The port list follows the entity of the
// description; the string lengths, busy_o and error_o, the port widths
// (defaults from the description's example) and the serial schedule are
// choices of this design.
module argon2id
  import argon2_pkg::*;
#(
  parameter int unsigned MAX_BLOCKS = 32,
  parameter int unsigned PW_BYTES   = 32,
  parameter int unsigned SALT_BYTES = 16,
  parameter int unsigned KEY_BYTES  = 32,
  parameter int unsigned AD_BYTES   = 12,
  parameter int unsigned TAG_BYTES  = 32
) (
  input  logic                    clk_i,
  input  logic                    rst_ni,
  input  logic                    valid_i,
  input  logic [8*PW_BYTES-1:0]   pwd_i,
  input  logic [31:0]             pwd_len_i,
  input  logic [8*SALT_BYTES-1:0] salt_i,
  input  logic [31:0]             salt_len_i,
  input  logic [8*KEY_BYTES-1:0]  key_i,
  input  logic [31:0]             key_len_i,
  input  logic [8*AD_BYTES-1:0]   ad_i,
  input  logic [31:0]             ad_len_i,
  input  logic [31:0]             lanes_i,
  input  logic [31:0]             tag_len_i,
  input  logic [31:0]             mem_kib_i,
  input  logic [31:0]             passes_i,
  input  logic [31:0]             version_i,
  input  logic [31:0]             type_i,
  output logic                    valid_o,
  output logic                    error_o,
  output logic [8*TAG_BYTES-1:0]  tag_o,
  output logic                    compressed_ready_o,
  output logic                    busy_o
);
  localparam int unsigned AW = $clog2(MAX_BLOCKS * BLOCK_WORDS);

  typedef enum logic [4:0] {
    S_IDLE, S_CHECK, S_DIV, S_H0_GO, S_H0_RUN, S_INIT_GO, S_INIT_RUN,
    S_SEG, S_BLK, S_AG_CLR, S_AG_LD, S_AG_C1, S_AG_CH, S_AG_C2, S_AG_CP,
    S_LDX, S_IDX_GO, S_IDX, S_LDY, S_COMP, S_WB, S_NEXT,
    S_FIN_GO, S_FIN_RD, S_FIN_EMIT, S_FIN_WAIT, S_DONE
  } state_e;

  state_e state_q;

  // ---------------------------------------------------------------- inputs
  logic [8*PW_BYTES-1:0]   pwd_q;
  logic [8*SALT_BYTES-1:0] salt_q;
  logic [8*KEY_BYTES-1:0]  key_q;
  logic [8*AD_BYTES-1:0]   ad_q;
  logic [31:0] pwd_len_q, salt_len_q, key_len_q, ad_len_q;
  logic [31:0] p_q, tlen_q, m_q, t_q, v_q, y_q;

  // --------------------------------------------------------- derived sizes
  logic [31:0] meff_q, acc_q, seglen_q, q_q, mprime_q;

  // --------------------------------------------------------------- position
  logic [31:0] pass_q, lane_q, idx_q, ctr_q;
  logic [1:0]  slice_q;
  logic        j_q;            // first-block number during initialisation
  logic [31:0] cur_q, prev_q;  // block numbers
  logic        di_q;           // data-independent addressing in this segment
  logic [63:0] pseudo_q;       // J1/J2 of the current block
  logic [31:0] ref_q;          // reference block number
  logic [63:0] h0_q [8];
  word_t       abuf_q [ADDR_PER_BLK];
  logic [7:0]  tag_q [TAG_BYTES];

  // ----------------------------------------------------------- counters
  logic [7:0]  w_q;            // word issue counter
  logic        rv_q;           // read data valid next cycle
  logic [6:0]  rw_q;           // word index of the returning read
  logic [31:0] fl_q;           // lane counter for C
  logic [2:0]  fb_q;           // byte counter for C
  logic [63:0] cacc_q;         // C word being collected
  logic [6:0]  cw_q;           // C word index
  logic [6:0]  ib_q;           // init message byte counter
  logic [7:0]  ow_q;           // H' output word counter

  // ------------------------------------------------------------- memory
  logic          mem_we, mem_re;
  logic [AW-1:0] mem_waddr, mem_raddr;
  word_t         mem_wdata, mem_rdata;

  argon2_mem #(.MAX_BLOCKS(MAX_BLOCKS)) u_mem (
    .clk_i, .we_i(mem_we), .waddr_i(mem_waddr), .wdata_i(mem_wdata),
    .re_i(mem_re), .raddr_i(mem_raddr), .rdata_o(mem_rdata)
  );

  // ----------------------------------------------------- compression G
  logic       g_clear, g_ld, g_ldx, g_start, g_chain, g_busy, g_done;
  logic [6:0] g_ldidx, g_rdidx;
  word_t      g_lddata, g_rddata;

  argon2_compress u_g (
    .clk_i, .rst_ni,
    .clear_i(g_clear), .ld_valid_i(g_ld), .ld_xor_i(g_ldx), .ld_idx_i(g_ldidx),
    .ld_data_i(g_lddata), .start_i(g_start), .chain_i(g_chain),
    .busy_o(g_busy), .done_o(g_done), .rd_idx_i(g_rdidx), .rd_data_o(g_rddata)
  );

  // ------------------------------------------------------------- index
  logic        ix_start, ix_done;
  logic [31:0] ix_lane, ix_col;

  argon2_index u_idx (
    .clk_i, .rst_ni, .start_i(ix_start), .pseudo_i(pseudo_q),
    .pass_i(pass_q), .slice_i(slice_q), .lane_i(lane_q), .index_i(idx_q),
    .lanes_i(p_q), .seglen_i(seglen_q), .q_i(q_q),
    .done_o(ix_done), .ref_lane_o(ix_lane), .ref_col_o(ix_col)
  );

  // ----------------------------------------------------------- H0 buffer
  logic       f_start, f_valid, f_last, f_ready;
  logic [7:0] f_byte;

  argon2_h0_msg #(
    .PW_BYTES(PW_BYTES), .SALT_BYTES(SALT_BYTES), .KEY_BYTES(KEY_BYTES), .AD_BYTES(AD_BYTES)
  ) u_h0msg (
    .clk_i, .rst_ni, .start_i(f_start),
    .lanes_i(p_q), .tag_len_i(tlen_q), .mem_kib_i(m_q), .passes_i(t_q),
    .version_i(v_q), .type_i(y_q),
    .pwd_i(pwd_q), .pwd_len_i(pwd_len_q), .salt_i(salt_q), .salt_len_i(salt_len_q),
    .key_i(key_q), .key_len_i(key_len_q), .ad_i(ad_q), .ad_len_i(ad_len_q),
    .valid_o(f_valid), .byte_o(f_byte), .last_o(f_last), .ready_i(f_ready)
  );

  // ------------------------------------------------------------------ H'
  logic        hp_start, hp_raw, hp_valid, hp_last, hp_ready;
  logic        hp_ovalid, hp_olast, hp_done;
  logic [31:0] hp_len;
  logic [7:0]  hp_byte;
  word_t       hp_oword;

  argon2_hprime u_hp (
    .clk_i, .rst_ni, .start_i(hp_start), .raw_i(hp_raw), .len_i(hp_len),
    .msg_valid_i(hp_valid), .msg_byte_i(hp_byte), .msg_last_i(hp_last),
    .msg_ready_o(hp_ready), .out_valid_o(hp_ovalid), .out_word_o(hp_oword),
    .out_last_o(hp_olast), .done_o(hp_done)
  );

  // ------------------------------------------------------ combinational
  logic [31:0] cur_col;
  logic        last_of_wb;
  logic        params_bad;

  always_comb begin
    params_bad = (p_q == 0) || (t_q == 0) || (y_q > 32'd2) ||
                 (tlen_q < 32'd4) || (tlen_q > 32'(TAG_BYTES)) ||
                 (pwd_len_q > 32'(PW_BYTES)) || (salt_len_q < 32'd8) ||
                 (salt_len_q > 32'(SALT_BYTES)) || (key_len_q > 32'(KEY_BYTES)) ||
                 (ad_len_q > 32'(AD_BYTES)) ||
                 (p_q > 32'(MAX_BLOCKS / 8)) || (m_q > 32'(MAX_BLOCKS));
  end

  always_comb cur_col = 32'(slice_q) * seglen_q + idx_q;

  always_comb begin
    // H' message and control
    hp_start = 1'b0;
    hp_raw   = 1'b0;
    hp_len   = 32'd1024;
    hp_valid = 1'b0;
    hp_byte  = '0;
    hp_last  = 1'b0;
    f_start  = 1'b0;
    f_ready  = 1'b0;
    unique case (state_q)
      S_H0_GO: begin
        hp_start = 1'b1; hp_raw = 1'b1; hp_len = 32'd64; f_start = 1'b1;
      end
      S_H0_RUN: begin
        hp_valid = f_valid; hp_byte = f_byte; hp_last = f_last; f_ready = hp_ready;
      end
      S_INIT_GO: hp_start = 1'b1;
      S_INIT_RUN: begin
        hp_valid = (ib_q < 7'd72);
        if (ib_q < 7'd64)      hp_byte = h0_q[ib_q[5:3]][8*ib_q[2:0] +: 8];
        else if (ib_q < 7'd68) hp_byte = (ib_q == 7'd64) ? {7'b0, j_q} : 8'd0;
        else                   hp_byte = lane_q[8*ib_q[1:0] +: 8];
        hp_last = (ib_q == 7'd71);
      end
      S_FIN_GO: begin
        hp_start = 1'b1; hp_len = tlen_q;
      end
      S_FIN_EMIT: begin
        hp_valid = 1'b1;
        hp_byte  = cacc_q[8*fb_q +: 8];
        hp_last  = (cw_q == 7'd127) && (fb_q == 3'd7);
      end
      default: ;
    endcase
  end

  always_comb begin
    // memory, compression unit and index unit control
    mem_re    = 1'b0;
    mem_raddr = '0;
    mem_we    = 1'b0;
    mem_waddr = '0;
    mem_wdata = hp_oword;
    g_clear   = (state_q == S_AG_CLR);
    g_ld      = 1'b0;
    g_ldx     = 1'b0;
    g_ldidx   = rw_q;
    g_lddata  = mem_rdata;
    g_start   = 1'b0;
    g_chain   = (state_q == S_AG_CH);
    g_rdidx   = (state_q == S_AG_CP) ? w_q[6:0] : rw_q;
    ix_start  = (state_q == S_IDX_GO);
    last_of_wb = 1'b0;
    unique case (state_q)
      S_INIT_RUN: begin
        mem_we    = hp_ovalid;
        mem_waddr = AW'((lane_q * q_q + 32'(j_q)) * BLOCK_WORDS + 32'(ow_q));
      end
      S_AG_LD: begin
        g_ld     = 1'b1;
        g_ldidx  = w_q[6:0];
        unique case (w_q[2:0])
          3'd0:    g_lddata = 64'(pass_q);
          3'd1:    g_lddata = 64'(lane_q);
          3'd2:    g_lddata = 64'(slice_q);
          3'd3:    g_lddata = 64'(mprime_q);
          3'd4:    g_lddata = 64'(t_q);
          3'd5:    g_lddata = 64'(y_q);
          default: g_lddata = 64'(ctr_q);
        endcase
      end
      S_AG_C1, S_AG_C2: g_start = !g_busy && !g_done;
      S_LDX, S_LDY: begin
        mem_re    = !w_q[7];
        mem_raddr = AW'(((state_q == S_LDX) ? prev_q : ref_q) * BLOCK_WORDS + 32'(w_q));
        g_ld      = rv_q;
        g_ldx     = (state_q == S_LDY);
      end
      S_COMP: g_start = !g_busy && !g_done;
      S_WB: begin
        mem_re    = !w_q[7];
        mem_raddr = AW'(cur_q * BLOCK_WORDS + 32'(w_q));
        mem_we    = rv_q;
        mem_waddr = AW'(cur_q * BLOCK_WORDS + 32'(rw_q));
        mem_wdata = g_rddata ^ ((pass_q != 0) ? mem_rdata : 64'd0);
        last_of_wb = rv_q && (rw_q == 7'd127);
      end
      S_FIN_RD: begin
        mem_re    = (fl_q < p_q);
        mem_raddr = AW'((fl_q * q_q + q_q - 32'd1) * BLOCK_WORDS + 32'(cw_q));
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      pwd_q <= '0; salt_q <= '0; key_q <= '0; ad_q <= '0;
      pwd_len_q <= '0; salt_len_q <= '0; key_len_q <= '0; ad_len_q <= '0;
      p_q <= '0; tlen_q <= '0; m_q <= '0; t_q <= '0; v_q <= '0; y_q <= '0;
      meff_q <= '0; acc_q <= '0; seglen_q <= '0; q_q <= '0; mprime_q <= '0;
      pass_q <= '0; lane_q <= '0; idx_q <= '0; ctr_q <= '0; slice_q <= '0; j_q <= 1'b0;
      cur_q <= '0; prev_q <= '0; di_q <= 1'b0; pseudo_q <= '0; ref_q <= '0;
      w_q <= '0; rv_q <= 1'b0; rw_q <= '0; fl_q <= '0; fb_q <= '0; cacc_q <= '0;
      cw_q <= '0; ib_q <= '0; ow_q <= '0;
      valid_o <= 1'b0; error_o <= 1'b0; compressed_ready_o <= 1'b0;
      for (int k = 0; k < 8; k++) h0_q[k] <= '0;
      for (int k = 0; k < int'(ADDR_PER_BLK); k++) abuf_q[k] <= '0;
      for (int k = 0; k < int'(TAG_BYTES); k++) tag_q[k] <= '0;
    end else begin
      valid_o            <= 1'b0;
      compressed_ready_o <= 1'b0;
      // read pipeline bookkeeping
      rv_q <= mem_re && (state_q != S_FIN_RD);
      rw_q <= w_q[6:0];

      unique case (state_q)
        S_IDLE: if (valid_i) begin
          pwd_q <= pwd_i; salt_q <= salt_i; key_q <= key_i; ad_q <= ad_i;
          pwd_len_q <= pwd_len_i; salt_len_q <= salt_len_i;
          key_len_q <= key_len_i; ad_len_q <= ad_len_i;
          p_q <= lanes_i; tlen_q <= tag_len_i; m_q <= mem_kib_i; t_q <= passes_i;
          v_q <= version_i; y_q <= type_i;
          error_o <= 1'b0;
          state_q <= S_CHECK;
        end

        S_CHECK: begin
          if (params_bad) begin
            error_o <= 1'b1;
            valid_o <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            meff_q   <= (m_q < 8 * p_q) ? 8 * p_q : m_q;
            acc_q    <= 4 * p_q;
            seglen_q <= '0;
            state_q  <= S_DIV;
          end
        end

        S_DIV: begin  // seglen = floor(meff / 4p) by repeated subtraction
          if (acc_q <= meff_q) begin
            seglen_q <= seglen_q + 32'd1;
            acc_q    <= acc_q + 4 * p_q;
          end else begin
            q_q      <= 4 * seglen_q;
            mprime_q <= 4 * seglen_q * p_q;
            state_q  <= S_H0_GO;
          end
        end

        S_H0_GO: begin
          ow_q    <= '0;
          state_q <= S_H0_RUN;
        end
        S_H0_RUN: begin
          if (hp_ovalid) begin
            h0_q[ow_q[2:0]] <= hp_oword;
            ow_q <= ow_q + 8'd1;
          end
          if (hp_done) begin
            lane_q  <= '0;
            j_q     <= 1'b0;
            state_q <= S_INIT_GO;
          end
        end

        S_INIT_GO: begin
          ib_q    <= '0;
          ow_q    <= '0;
          state_q <= S_INIT_RUN;
        end
        S_INIT_RUN: begin
          if (hp_valid && hp_ready) ib_q <= ib_q + 7'd1;
          if (hp_ovalid) ow_q <= ow_q + 8'd1;
          if (hp_done) begin
            if (j_q == 1'b0) begin
              j_q     <= 1'b1;
              state_q <= S_INIT_GO;
            end else if (lane_q + 1 < p_q) begin
              j_q     <= 1'b0;
              lane_q  <= lane_q + 32'd1;
              state_q <= S_INIT_GO;
            end else begin
              pass_q  <= '0;
              slice_q <= '0;
              lane_q  <= '0;
              state_q <= S_SEG;
            end
          end
        end

        S_SEG: begin
          idx_q   <= (pass_q == 0 && slice_q == 2'd0) ? 32'd2 : 32'd0;
          di_q    <= (y_q == 32'd1) || (y_q == 32'd2 && pass_q == 0 && slice_q < 2'd2);
          ctr_q   <= '0;
          // a first segment no longer than the two initial blocks has no work
          state_q <= (pass_q == 0 && slice_q == 2'd0 && seglen_q <= 32'd2) ? S_NEXT : S_BLK;
        end

        S_BLK: begin
          cur_q   <= lane_q * q_q + cur_col;
          prev_q  <= lane_q * q_q + ((cur_col == 0) ? q_q - 32'd1 : cur_col - 32'd1);
          w_q     <= '0;
          if (di_q && (ctr_q == 0 || idx_q[6:0] == 7'd0)) state_q <= S_AG_CLR;
          else                                            state_q <= S_LDX;
        end

        // address block: G(0, G(0, Z)), Z = (pass, lane, slice, m', t, y, counter, 0...)
        S_AG_CLR: begin
          ctr_q   <= ctr_q + 32'd1;
          w_q     <= '0;
          state_q <= S_AG_LD;
        end
        S_AG_LD: begin
          w_q <= w_q + 8'd1;
          if (w_q == 8'd6) state_q <= S_AG_C1;
        end
        S_AG_C1: if (g_done) state_q <= S_AG_CH;
        S_AG_CH: state_q <= S_AG_C2;
        S_AG_C2: if (g_done) begin
          w_q     <= '0;
          state_q <= S_AG_CP;
        end
        S_AG_CP: begin
          abuf_q[w_q[6:0]] <= g_rddata;
          w_q <= w_q + 8'd1;
          if (w_q == 8'd127) begin
            w_q     <= '0;
            state_q <= S_LDX;
          end
        end

        S_LDX: begin
          if (!w_q[7]) w_q <= w_q + 8'd1;
          if (rv_q && rw_q == 7'd0 && !di_q) pseudo_q <= mem_rdata;
          if (rv_q && rw_q == 7'd127) begin
            if (di_q) pseudo_q <= abuf_q[idx_q[6:0]];
            state_q <= S_IDX_GO;
          end
        end
        S_IDX_GO: state_q <= S_IDX;
        S_IDX: if (ix_done) begin
          ref_q   <= ix_lane * q_q + ix_col;
          w_q     <= '0;
          state_q <= S_LDY;
        end
        S_LDY: begin
          if (!w_q[7]) w_q <= w_q + 8'd1;
          if (rv_q && rw_q == 7'd127) state_q <= S_COMP;
        end
        S_COMP: if (g_done) begin
          compressed_ready_o <= 1'b1;
          w_q     <= '0;
          state_q <= S_WB;
        end
        S_WB: begin
          if (!w_q[7]) w_q <= w_q + 8'd1;
          if (last_of_wb) state_q <= S_NEXT;
        end

        S_NEXT: begin
          if (idx_q + 1 < seglen_q) begin
            idx_q   <= idx_q + 32'd1;
            state_q <= S_BLK;
          end else if (lane_q + 1 < p_q) begin
            lane_q  <= lane_q + 32'd1;
            state_q <= S_SEG;
          end else if (slice_q != 2'd3) begin
            lane_q  <= '0;
            slice_q <= slice_q + 2'd1;
            state_q <= S_SEG;
          end else if (pass_q + 1 < t_q) begin
            lane_q  <= '0;
            slice_q <= '0;
            pass_q  <= pass_q + 32'd1;
            state_q <= S_SEG;
          end else begin
            state_q <= S_FIN_GO;
          end
        end

        // final block C = xor of the last column, hashed to the tag
        S_FIN_GO: begin
          cw_q    <= '0;
          fl_q    <= '0;
          cacc_q  <= '0;
          ow_q    <= '0;
          for (int k = 0; k < int'(TAG_BYTES); k++) tag_q[k] <= '0;
          state_q <= S_FIN_RD;
        end
        S_FIN_RD: begin
          if (fl_q < p_q) fl_q <= fl_q + 32'd1;
          if (fl_q != 0) cacc_q <= cacc_q ^ mem_rdata;   // data of lane fl_q-1
          if (fl_q == p_q) begin
            fb_q    <= '0;
            state_q <= S_FIN_EMIT;
          end
        end
        S_FIN_EMIT: if (hp_ready) begin
          fb_q <= fb_q + 3'd1;
          if (fb_q == 3'd7) begin
            cacc_q <= '0;
            fl_q   <= '0;
            cw_q   <= cw_q + 7'd1;
            state_q <= (cw_q == 7'd127) ? S_FIN_WAIT : S_FIN_RD;
          end
        end
        S_FIN_WAIT: if (hp_done) begin
          valid_o <= 1'b1;
          state_q <= S_DONE;
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase

      // tag collection runs alongside the final H'
      if ((state_q == S_FIN_EMIT || state_q == S_FIN_RD || state_q == S_FIN_WAIT) && hp_ovalid) begin
        for (int b = 0; b < 8; b++) begin
          if (8 * int'(ow_q) + b < int'(TAG_BYTES) && 32'(8 * int'(ow_q) + b) < tlen_q)
            tag_q[8 * int'(ow_q) + b] <= hp_oword[8*b +: 8];
        end
        ow_q <= ow_q + 8'd1;
      end
    end
  end

  always_comb
    for (int k = 0; k < int'(TAG_BYTES); k++) tag_o[8*TAG_BYTES-1 - 8*k -: 8] = tag_q[k];

  assign busy_o = (state_q != S_IDLE);

  // The tag hash ends with its final word before valid_o.
  a_tag_last: assert property (@(posedge clk_i) disable iff (!rst_ni)
                               hp_olast |-> state_q inside {S_H0_RUN, S_INIT_RUN, S_FIN_WAIT});
  // The engines are never started while busy.
  a_g_start: assert property (@(posedge clk_i) disable iff (!rst_ni)
                              g_start |-> !g_busy);
  // A result is reported at most once per request.
  a_one_result: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                 valid_o |=> !valid_o);
endmodule
