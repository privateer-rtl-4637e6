// attae_pkg -- shared number format and arithmetic for the Att-AE accelerator.
//
// Every activation, weight, bias and normalisation parameter is a 32-bit
// signed fixed-point number in Q8.24 format (sign, 7 integer bits, 24
// fractional bits), as used by the accelerator described for this design.
// Products of two Q8.24 numbers are Q16.48 and are kept at full precision
// inside the accumulators; they are only cut back to Q8.24 (arithmetic shift,
// then saturation) when a result leaves a block.  The model dimensions
// (12 timesteps, 8 input features, a 32-wide embedding) are the evaluated
// configuration; the feed-forward and decoder hidden widths are this
// design's own choice because no value for them is given.
package attae_pkg;

  localparam int unsigned DATA_W = 32;   // Q8.24 word
  localparam int unsigned FRAC_W = 24;   // fractional bits
  localparam int unsigned PROD_W = 2 * DATA_W;  // Q16.48 product

  localparam int unsigned NTS     = 12;  // timesteps per sequence
  localparam int unsigned N_FEAT  = 8;   // input features per timestep
  localparam int unsigned D_MODEL = 32;  // embedding width
  localparam int unsigned D_FF    = 64;  // encoder feed-forward width (assumed)
  localparam int unsigned D_DEC   = 16;  // decoder hidden width (assumed)

  typedef logic signed [DATA_W-1:0] q_t;  // one Q8.24 word
  typedef logic signed [PROD_W-1:0] p_t;  // one Q16.48 word

  localparam q_t Q_ONE = q_t'(1) <<< FRAC_W;
  localparam q_t Q_MAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam q_t Q_MIN = {1'b1, {(DATA_W-1){1'b0}}};

  // Layer identifiers on the parameter-load bus.
  typedef enum logic [4:0] {
    L_EMBED  = 5'd0,   // input embedding Linear (8 -> 32)
    L_POSENC = 5'd1,   // positional-encoding table
    L_Q      = 5'd2,   // queries Linear
    L_K      = 5'd3,   // keys Linear
    L_V      = 5'd4,   // values Linear
    L_OPROJ  = 5'd5,   // attention output projection Linear
    L_LN1    = 5'd6,   // encoder LayerNorm after attention
    L_FF1    = 5'd7,   // encoder feed-forward Linear 1
    L_FF2    = 5'd8,   // encoder feed-forward Linear 2
    L_LN2    = 5'd9,   // encoder LayerNorm after feed-forward
    L_LN3    = 5'd10,  // decoder LayerNorm
    L_DEC1   = 5'd11,  // decoder Linear 1
    L_DEC2   = 5'd12,  // decoder Linear 2
    L_SCORE  = 5'd13   // anomaly threshold
  } layer_id_e;

  // Saturate a wide signed value, already scaled to Q8.24, into one word.
  function automatic q_t sat_q(input logic signed [PROD_W+15:0] v);
    if (v > $signed({{(PROD_W+16-DATA_W){1'b0}}, Q_MAX})) return Q_MAX;
    if (v < $signed({{(PROD_W+16-DATA_W){1'b1}}, Q_MIN})) return Q_MIN;
    return v[DATA_W-1:0];
  endfunction

  // Q8.24 x Q8.24 -> Q8.24, truncating toward minus infinity, saturating.
  function automatic q_t qmul(input q_t a, input q_t b);
    logic signed [PROD_W+15:0] p;
    p = (PROD_W+16)'(a) * (PROD_W+16)'(b);
    return sat_q(p >>> FRAC_W);
  endfunction

  // Saturating Q8.24 addition.
  function automatic q_t qadd(input q_t a, input q_t b);
    logic signed [PROD_W+15:0] s;
    s = (PROD_W+16)'(a) + (PROD_W+16)'(b);
    return sat_q(s);
  endfunction

endpackage
