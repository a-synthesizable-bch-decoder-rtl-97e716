// bch_pkg: types, code tables and Galois-field arithmetic shared by the
// DVB-S2 BCH decoder.
//
// The decoder works in GF(2^16) for normal frames and GF(2^14) for short
// frames. Both fields are held in a 16-bit element type; in the short field
// the two top bits are always zero. The field is chosen per frame at run
// time, so every multiplier takes a `short_frame` select that picks the
// reducing polynomial (G1 of the respective table, which is primitive).
//
// The twelve minimal polynomials G1..G12 of each frame type are the ones of
// the DVB-S2 standard; G_i is the minimal polynomial of alpha^(2i-1). For
// the normal-frame G6 that is x^16+x^15+x^14+x^13+x^12+x^10+x^9+x^8+x^7+
// x^5+x^4+x^2+1 (alpha^11); all 24 entries satisfy G_i(alpha^(2i-1)) = 0. The
// code table (K_bch, N_bch, t for the 11 normal and 10 short code rates) is
// that of the standard as well. The code-rate encoding and the struct layout
// are this design's own.
package bch_pkg;

  localparam int unsigned M_MAX  = 16;     // bits of a field element
  localparam int unsigned T_MAX  = 12;     // largest error-correction capacity
  localparam int unsigned NSYN   = 2 * T_MAX;
  localparam int unsigned K_MAX  = 58192;  // largest BBFRAME (normal, rate 9/10)
  localparam int unsigned CNT_W  = 16;     // width of the frame bit counters

  typedef logic [M_MAX-1:0] gf_t;

  typedef enum logic {
    FRAME_NORMAL = 1'b0,
    FRAME_SHORT  = 1'b1
  } frame_t;

  typedef enum logic [3:0] {
    CR_1_4  = 4'd0,
    CR_1_3  = 4'd1,
    CR_2_5  = 4'd2,
    CR_1_2  = 4'd3,
    CR_3_5  = 4'd4,
    CR_2_3  = 4'd5,
    CR_3_4  = 4'd6,
    CR_4_5  = 4'd7,
    CR_5_6  = 4'd8,
    CR_8_9  = 4'd9,
    CR_9_10 = 4'd10
  } code_rate_t;

  // States of the decoder's controller.
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,   // waiting for the first bit of a frame
    ST_RX1  = 3'd1,   // receiving the K information bits (SC and MB)
    ST_RX2  = 3'd2,   // receiving the N-K parity bits (SC only)
    ST_KES  = 3'd3,   // syndrome check, key equation solving
    ST_TX   = 3'd4    // reading out and correcting the K bits
  } bch_state_t;

  // Frame parameters of one decoding configuration.
  typedef struct packed {
    logic              short_frame;  // 1: GF(2^14), 0: GF(2^16)
    logic [CNT_W-1:0]  k;            // BBFRAME (information) bits, K_bch
    logic [CNT_W-1:0]  n;            // codeword bits, N_bch
    logic [3:0]        t;            // correctable errors
  } bch_cfg_t;

  // Minimal polynomials, bit i = coefficient of x^i (the x^m term included).
  localparam logic [11:0][16:0] G_NORMAL = '{
    17'h11ae3, 17'h13a2d, 17'h175a7, 17'h10ea1, 17'h17367, 17'h1af65,
    17'h1f7b5, 17'h11f2f, 17'h15a55, 17'h10fbd, 17'h10173, 17'h1002d};
  localparam logic [11:0][16:0] G_SHORT = '{
    17'h065ef, 17'h05811, 17'h05a49, 17'h0460f, 17'h04f21, 17'h06ce5,
    17'h06389, 17'h06b55, 17'h05591, 17'h04647, 17'h04941, 17'h0402b};

  // Reducing (primitive) polynomials without the x^m term.
  localparam gf_t PRIM_NORMAL = 16'h002d;  // x^16 + x^5 + x^3 + x^2 + 1
  localparam gf_t PRIM_SHORT  = 16'h002b;  // x^14 + x^5 + x^3 + x + 1

  // Multiply by x (alpha) in the selected field.
  function automatic gf_t gf_xtime(gf_t a, logic short_frame);
    gf_t r;
    if (short_frame) begin
      r = {2'b00, a[12:0], 1'b0};
      if (a[13]) r ^= PRIM_SHORT;
    end else begin
      r = {a[14:0], 1'b0};
      if (a[15]) r ^= PRIM_NORMAL;
    end
    return r;
  endfunction

  // General multiplier, MSB-first shift-and-add with reduction.
  function automatic gf_t gf_mul(gf_t a, gf_t b, logic short_frame);
    gf_t r = '0;
    for (int i = M_MAX - 1; i >= 0; i--) begin
      r = gf_xtime(r, short_frame);
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  // alpha^e by square-and-multiply (used for constants only).
  function automatic gf_t gf_pow(int unsigned e, logic short_frame);
    gf_t r = 16'h0001;
    gf_t b = 16'h0002;
    int unsigned q = short_frame ? 16383 : 65535;
    int unsigned x = e % q;
    for (int i = 0; i < 17; i++) begin
      if (x[i]) r = gf_mul(r, b, short_frame);
      b = gf_mul(b, b, short_frame);
    end
    return r;
  endfunction

  // Code table of the DVB-S2 standard. Short frames have no rate 9/10;
  // that setting is decoded as short rate 8/9.
  function automatic bch_cfg_t lookup_cfg(frame_t ft, code_rate_t cr);
    bch_cfg_t c;
    c.short_frame = (ft == FRAME_SHORT);
    if (ft == FRAME_NORMAL) begin
      unique case (cr)
        CR_1_4:  begin c.k = 16'd16008; c.n = 16'd16200; c.t = 4'd12; end
        CR_1_3:  begin c.k = 16'd21408; c.n = 16'd21600; c.t = 4'd12; end
        CR_2_5:  begin c.k = 16'd25728; c.n = 16'd25920; c.t = 4'd12; end
        CR_1_2:  begin c.k = 16'd32208; c.n = 16'd32400; c.t = 4'd12; end
        CR_3_5:  begin c.k = 16'd38688; c.n = 16'd38880; c.t = 4'd12; end
        CR_2_3:  begin c.k = 16'd43040; c.n = 16'd43200; c.t = 4'd10; end
        CR_3_4:  begin c.k = 16'd48408; c.n = 16'd48600; c.t = 4'd12; end
        CR_4_5:  begin c.k = 16'd51648; c.n = 16'd51840; c.t = 4'd12; end
        CR_5_6:  begin c.k = 16'd53840; c.n = 16'd54000; c.t = 4'd10; end
        CR_8_9:  begin c.k = 16'd57472; c.n = 16'd57600; c.t = 4'd8;  end
        default: begin c.k = 16'd58192; c.n = 16'd58320; c.t = 4'd8;  end
      endcase
    end else begin
      unique case (cr)
        CR_1_4:  begin c.k = 16'd3072;  c.n = 16'd3240;  c.t = 4'd12; end
        CR_1_3:  begin c.k = 16'd5232;  c.n = 16'd5400;  c.t = 4'd12; end
        CR_2_5:  begin c.k = 16'd6312;  c.n = 16'd6480;  c.t = 4'd12; end
        CR_1_2:  begin c.k = 16'd7032;  c.n = 16'd7200;  c.t = 4'd12; end
        CR_3_5:  begin c.k = 16'd9552;  c.n = 16'd9720;  c.t = 4'd12; end
        CR_2_3:  begin c.k = 16'd10632; c.n = 16'd10800; c.t = 4'd12; end
        CR_3_4:  begin c.k = 16'd11712; c.n = 16'd11880; c.t = 4'd12; end
        CR_4_5:  begin c.k = 16'd12432; c.n = 16'd12600; c.t = 4'd12; end
        CR_5_6:  begin c.k = 16'd13152; c.n = 16'd13320; c.t = 4'd12; end
        default: begin c.k = 16'd14232; c.n = 16'd14400; c.t = 4'd12; end
      endcase
    end
    return c;
  endfunction

endpackage
