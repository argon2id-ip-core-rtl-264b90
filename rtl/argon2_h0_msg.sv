// argon2_h0_msg: serialises the input buffer that H0 is hashed from:
//   LE32(p) || LE32(T) || LE32(m) || LE32(t) || LE32(v) || LE32(y) ||
//   LE32(|P|) || P || LE32(|S|) || S || LE32(|K|) || K || LE32(|X|) || X
// where LE32 is the 32-bit little-endian encoding.
//
// The strings arrive on fixed-width ports with their lengths in bytes;
// byte 0 of a string is its most significant byte (the leftmost one when
// the port value is written in hex), and only the first |P|, |S|, |K|,
// |X| bytes are sent, so empty strings are skipped. The lengths must not
// exceed the port widths; the parent checks this. start_i begins a new
// message; bytes then leave on valid_o/byte_o with last_o on the final
// byte, one per cycle while ready_i is high. The field order follows the
// Argon2 specification, which the description abbreviates after S.
// The parameter values and strings must be held stable while the message
// is sent. Port widths default to the sizes of the description's example
// (32-byte password, 16-byte salt, 12-byte associated data) and to its
// 32-byte maximum for the key.
module argon2_h0_msg #(
  parameter int unsigned PW_BYTES   = 32,
  parameter int unsigned SALT_BYTES = 16,
  parameter int unsigned KEY_BYTES  = 32,
  parameter int unsigned AD_BYTES   = 12
) (
  input  logic                    clk_i,
  input  logic                    rst_ni,
  input  logic                    start_i,
  input  logic [31:0]             lanes_i,
  input  logic [31:0]             tag_len_i,
  input  logic [31:0]             mem_kib_i,
  input  logic [31:0]             passes_i,
  input  logic [31:0]             version_i,
  input  logic [31:0]             type_i,
  input  logic [8*PW_BYTES-1:0]   pwd_i,
  input  logic [31:0]             pwd_len_i,
  input  logic [8*SALT_BYTES-1:0] salt_i,
  input  logic [31:0]             salt_len_i,
  input  logic [8*KEY_BYTES-1:0]  key_i,
  input  logic [31:0]             key_len_i,
  input  logic [8*AD_BYTES-1:0]   ad_i,
  input  logic [31:0]             ad_len_i,
  output logic                    valid_o,
  output logic [7:0]              byte_o,
  output logic                    last_o,
  input  logic                    ready_i
);
  logic        active_q;
  logic [3:0]  seg_q;    // field 0..13
  logic [31:0] cnt_q;    // byte inside the field

  function automatic logic [31:0] seg_len(logic [3:0] s, logic [31:0] lp, logic [31:0] ls,
                                          logic [31:0] lk, logic [31:0] lx);
    unique case (s)
      4'd7:    return lp;
      4'd9:    return ls;
      4'd11:   return lk;
      4'd13:   return lx;
      default: return 32'd4;
    endcase
  endfunction

  logic [31:0] len_cur, len_next;
  logic [3:0]  seg_next;
  always_comb begin
    len_cur  = seg_len(seg_q, pwd_len_i, salt_len_i, key_len_i, ad_len_i);
    seg_next = seg_q + 4'd1;
    len_next = seg_len(seg_next, pwd_len_i, salt_len_i, key_len_i, ad_len_i);
    if (len_next == 0) seg_next = seg_q + 4'd2;   // empty string: go to next length field
  end

  always_comb begin
    byte_o = '0;
    unique case (seg_q)
      4'd0:  byte_o = lanes_i[8*cnt_q[1:0] +: 8];
      4'd1:  byte_o = tag_len_i[8*cnt_q[1:0] +: 8];
      4'd2:  byte_o = mem_kib_i[8*cnt_q[1:0] +: 8];
      4'd3:  byte_o = passes_i[8*cnt_q[1:0] +: 8];
      4'd4:  byte_o = version_i[8*cnt_q[1:0] +: 8];
      4'd5:  byte_o = type_i[8*cnt_q[1:0] +: 8];
      4'd6:  byte_o = pwd_len_i[8*cnt_q[1:0] +: 8];
      4'd7:  byte_o = pwd_i[8*PW_BYTES-1 - 8*cnt_q[$clog2(PW_BYTES+1)-1:0] -: 8];
      4'd8:  byte_o = salt_len_i[8*cnt_q[1:0] +: 8];
      4'd9:  byte_o = salt_i[8*SALT_BYTES-1 - 8*cnt_q[$clog2(SALT_BYTES+1)-1:0] -: 8];
      4'd10: byte_o = key_len_i[8*cnt_q[1:0] +: 8];
      4'd11: byte_o = key_i[8*KEY_BYTES-1 - 8*cnt_q[$clog2(KEY_BYTES+1)-1:0] -: 8];
      4'd12: byte_o = ad_len_i[8*cnt_q[1:0] +: 8];
      4'd13: byte_o = ad_i[8*AD_BYTES-1 - 8*cnt_q[$clog2(AD_BYTES+1)-1:0] -: 8];
      default: ;
    endcase
  end

  logic at_end;
  assign at_end  = (cnt_q == len_cur - 32'd1);
  assign valid_o = active_q;
  assign last_o  = active_q && at_end &&
                   (seg_q == 4'd13 || (seg_q == 4'd12 && ad_len_i == 0));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      active_q <= 1'b0;
      seg_q    <= '0;
      cnt_q    <= '0;
    end else if (start_i) begin
      active_q <= 1'b1;
      seg_q    <= '0;
      cnt_q    <= '0;
    end else if (active_q && ready_i) begin
      if (last_o) begin
        active_q <= 1'b0;
      end else if (at_end) begin
        seg_q <= seg_next;
        cnt_q <= '0;
      end else begin
        cnt_q <= cnt_q + 32'd1;
      end
    end
  end
endmodule
