// rs_pkg: shared types, constants and GF(2^8) arithmetic for the adaptive
// Reed-Solomon receiver.
//
// The code is RS(255, 255-2t) over GF(2^8), t = 1..4, as in the design this
// RTL follows. The field is built on the primitive polynomial
// x^8 + x^4 + x^3 + x^2 + 1 (0x11D) and the code's generator roots are
// alpha^0 .. alpha^(2t-1); both are choices of this implementation, the
// source design names neither. Symbols of a codeword travel highest degree
// first: symbol index i of a packet is the coefficient of x^(254-i).
//
// gf_mul is a combinational shift-and-add multiplier, gf_inv a one-cycle
// inverse (a^254 by square-and-multiply), gf_alpha_pow a constant function
// used to build the constant multipliers of the syndrome and Chien units.
package rs_pkg;

  localparam int GF_M = 8;
  localparam int RS_N = 255;
  localparam int T_MAX = 4;
  localparam logic [7:0] GF_POLY_LOW = 8'h1D;  // x^8 term implied

  typedef logic [7:0] gf_t;

  // Width of a packet sequence number and of a decoder job tag
  // ({retransmission flag, sequence number}).
  localparam int SEQ_W = 16;
  localparam int TAG_W = SEQ_W + 1;

  // Sideband header carried with each arriving packet.
  typedef struct packed {
    logic [SEQ_W-1:0] seq;   // sequence number
    logic [2:0]       t;     // error correction capability the packet was encoded with
    logic             retx;  // packet is a retransmission answering a NAK
  } pkt_hdr_t;

  // Control packets sent back on the feedback channel.
  typedef enum logic [7:0] {
    CP_ACK   = 8'h41,
    CP_NAK   = 8'h4E,
    CP_CHG_T = 8'h54
  } cp_type_e;

  localparam int CP_LEN = 4;  // type, seq[15:8], seq[7:0], t

  // Number of parallel decoders that fit one FPGA for each t.
  function automatic int lanes_for_t(input int t);
    case (t)
      1: return 14;
      2: return 6;
      3: return 4;
      default: return 3;
    endcase
  endfunction

  function automatic gf_t gf_xtime(input gf_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? GF_POLY_LOW : 8'h00);
  endfunction

  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    gf_t p;
    gf_t x;
    p = '0;
    x = a;
    for (int i = 0; i < GF_M; i++) begin
      if (b[i]) p ^= x;
      x = gf_xtime(x);
    end
    return p;
  endfunction

  // alpha^k for any k >= 0 (alpha^255 = 1).
  function automatic gf_t gf_alpha_pow(input int k);
    gf_t x;
    x = 8'h01;
    for (int i = 0; i < (k % RS_N); i++) x = gf_xtime(x);
    return x;
  endfunction

  // Multiplicative inverse, a^254 = a^2 * a^4 * ... * a^128; gf_inv(0) = 0.
  function automatic gf_t gf_inv(input gf_t a);
    gf_t r;
    gf_t p;
    r = 8'h01;
    p = a;
    for (int i = 1; i < GF_M; i++) begin
      p = gf_mul(p, p);
      r = gf_mul(r, p);
    end
    return r;
  endfunction

endpackage
