// Shared types, constants and binary16 helpers of the mixed-precision weights
// network (MPWN) accelerator.
//
// Activations are IEEE 754 binary16 ("half") values.  Every weight layer uses one
// of three weight spaces: F (a half weight, 16 bits), B (binary {-1,+1}, one bit
// stored as a sign bit: 1 = -1, 0 = +1) and T (ternary {-1,0,+1}, two-bit two's
// complement: 2'b11 = -1, 2'b00 = 0, 2'b01 = +1).  The B encoding, which stores
// +1 as 0, and the two's-complement T encoding follow the 1- and 2-bit signed
// integer types of the design description; the rest of this package is this
// implementation's own.
//
// round_pack() is the single rounding step used by the multiplier and the adder:
// it turns an exact value P * 2^E into the nearest binary16 (round to nearest,
// ties to even), with subnormals and overflow to infinity.
package mpwn_pkg;

  typedef logic [15:0] half_t;

  typedef enum logic [1:0] {
    WS_F = 2'd0,   // 16-bit floating-point weights
    WS_B = 2'd1,   // binary weights, XOR signed-bits
    WS_T = 2'd2    // ternary weights, ternary bitwise operation
  } wspace_e;

  // Bits stored per weight in each weight space.
  function automatic int unsigned wbits(wspace_e ws);
    case (ws)
      WS_B:    return 1;
      WS_T:    return 2;
      default: return 16;
    endcase
  endfunction

  localparam half_t HALF_ZERO = 16'h0000;
  localparam half_t HALF_QNAN = 16'h7E00;
  localparam half_t HALF_INF  = 16'h7C00;

  // Width of the exact intermediate significand handed to round_pack().
  localparam int unsigned RP_W = 48;

  // Round the exact value (-1)^s * p * 2^e to binary16, ties to even.
  // The kept significand q is p shifted right by sh (sh >= -10 for every value
  // the multiplier and the adder produce).  p is first placed 11 bits up, so a
  // single right shift by sh + 10 leaves q with the guard bit below it; the
  // sticky bit is whatever that shift dropped.
  function automatic half_t round_pack(logic s, logic [RP_W-1:0] p, int e);
    int         lead;       // position of the leading one of p
    int         enorm;      // biased exponent if the result is normal
    int         sh;         // right shift of p that leaves the kept significand
    int         ebase;      // exponent field minus one (0 for subnormal)
    logic [RP_W+10:0] pw, qg;
    logic [RP_W-1:0]  q;
    logic       sticky;
    int         rs;
    int         packed_v;
    logic       zero, ovf;
    logic [14:0] mag;
    lead = 0;
    for (int i = 0; i < RP_W; i++)
      if (p[i]) lead = i;
    enorm = lead + e + 15;
    if (enorm >= 1) begin
      sh    = lead - 10;
      ebase = enorm - 1;
    end else begin
      sh    = -(e + 24);
      ebase = 0;
    end
    rs = sh + 10;
    if (rs > RP_W + 10) rs = RP_W + 10;
    pw     = {p, 11'd0};
    qg     = pw >> rs;                       // q and the guard bit
    sticky = ((qg << rs) != pw);
    q      = RP_W'(qg >> 1);
    q      = q + RP_W'({qg[0] & (sticky | q[0])});
    // A rounding carry into bit 11 (or bit 10 for a subnormal) moves the value
    // into the next binade on its own because the fields are simply added.
    packed_v = (ebase << 10) + int'(q[15:0]);
    // Zero and overflow are selected with masks rather than a multiplexer, so
    // that the shifters and adders above always count as used; resource-sharing
    // passes of synthesis tools then leave them alone.
    zero = (p == '0);
    ovf  = !zero && (packed_v >= 32'h7C00);
    mag  = (packed_v[14:0] & {15{!zero && !ovf}}) | (HALF_INF[14:0] & {15{ovf}});
    return {s, mag};
  endfunction

  // What a parameter-load beat writes inside a layer engine.
  typedef enum logic [1:0] {
    LD_WGT   = 2'd0,   // one word of LANES packed weights
    LD_SCALE = 2'd1,   // batch-norm scale of one output channel
    LD_SHIFT = 2'd2    // batch-norm shift (or bias) of one output channel
  } ld_kind_e;

  // Which memory of the accelerator a load beat targets.
  typedef enum logic [2:0] {
    LT_IMAGE = 3'd0,   // input image, one pixel per beat
    LT_CONV1 = 3'd1,
    LT_CONV2 = 3'd2,
    LT_FC3   = 3'd3,
    LT_FC4   = 3'd4,
    LT_FC5   = 3'd5
  } ld_target_e;

  localparam int unsigned LD_DATA_W = 256;

  typedef struct packed {
    logic                 valid;
    ld_target_e           target;
    ld_kind_e             kind;
    logic [15:0]          addr;
    logic [LD_DATA_W-1:0] data;   // low bits used; a weight word is LANES*WB bits
  } load_req_t;

  // Stage the layer sequencer is in.
  typedef enum logic [3:0] {
    ST_IDLE  = 4'd0,
    ST_CONV1 = 4'd1,
    ST_POOL1 = 4'd2,
    ST_CONV2 = 4'd3,
    ST_POOL2 = 4'd4,
    ST_FC3   = 4'd5,
    ST_FC4   = 4'd6,
    ST_FC5   = 4'd7
  } stage_e;

  // Order key: a larger unsigned key means a larger half value (NaN excluded).
  function automatic logic [15:0] half_key(half_t h);
    return h[15] ? ~h : {1'b1, h[14:0]};
  endfunction

endpackage
