// pidflc_pkg: widths, number formats, table contents and helper functions
// shared by the PID-like fuzzy controller.
//
// Number formats. Controller signals (yd, yp, e, r, u) are 8-bit two's
// complement with 1.0 represented by 128, so the fuzzy universe [-1, 1) of
// both inputs and of the output covers the whole code range. Gains are 8-bit
// unsigned fixed point with 4 integer and 4 fraction bits (0x10 = 1.0). Inside
// a PD fuzzy controller the fuzzy inference system works on the shifted,
// unsigned range [0, 255], where code 128 is zero.
//
// Fuzzy sets. Each input has eight fuzzy sets (3-bit set number). Memberships
// are 6-bit, with "one" = 63, so that 1 - mu is the bitwise inverse of mu. The
// default input sets are symmetric triangles with peaks 32 codes apart at
// 16 + 32*k (k = 0..7) in the shifted range, the outer two held at full
// membership beyond their peaks (shoulders). Each memory word holds the first
// active set and its membership; the second active set is always the next one
// with the complementary membership.
//
// Output sets are singletons spread evenly over [-1, 1]: in the shifted range
// they sit at round(256*k/7), clipped to 255, for k = 0..7.
//
// The rule table has 64 rules, one per pair (error set, rate set); the
// consequent set numbers below are the printed table of the design, with sets
// numbered NB=0, NM=1, NS=2, NZ=3, PZ=4, PS=5, PM=6, PB=7.
package pidflc_pkg;

  localparam int unsigned DW      = 8;   // controller data width
  localparam int unsigned MUW     = 6;   // membership degree width
  localparam int unsigned IDXW    = 3;   // fuzzy set number width
  localparam int unsigned NSETS   = 8;   // fuzzy sets per variable
  localparam int unsigned KW      = 8;   // gain coefficient width
  localparam int unsigned KFRAC   = 4;   // gain fraction bits

  localparam logic [MUW-1:0] MU_ONE = '1;

  typedef logic signed [DW-1:0] sdata_t;   // controller-side signal
  typedef logic        [DW-1:0] udata_t;   // FIS-side (shifted) signal
  typedef logic        [KW-1:0] gain_t;    // 4.4 gain coefficient
  typedef logic      [IDXW-1:0] set_idx_t;
  typedef logic       [MUW-1:0] mu_t;

  // One word of the input fuzzy sets' memory.
  typedef struct packed {
    set_idx_t idx;   // first active fuzzy set
    mu_t      mu;    // membership in that set
  } mf_word_t;

  // Information about one active fuzzy set, as delivered by a fuzzifier.
  typedef struct packed {
    set_idx_t idx;
    mu_t      mu;
  } active_set_t;

  // Controller type selected by the selection lines mi, mo.
  typedef enum logic [1:0] {
    MODE_PD  = 2'd0,
    MODE_PI  = 2'd1,
    MODE_PID = 2'd2
  } mode_t;

  // Table I: mi=1 -> PIDFLC, mi=0 mo=0 -> PDFLC, mi=0 mo=1 -> PIFLC.
  function automatic mode_t decode_mode(input logic mi, input logic mo);
    if (mi)      return MODE_PID;
    else if (mo) return MODE_PI;
    else         return MODE_PD;
  endfunction

  // Saturate a wide signed value to the controller's 8-bit range.
  function automatic sdata_t sat8(input logic signed [19:0] v);
    if (v > 20'sd127)       return sdata_t'(8'sd127);
    else if (v < -20'sd128) return sdata_t'(-8'sd128);
    else                    return sdata_t'(v[DW-1:0]);
  endfunction

  // Product of a signed 8-bit value and an unsigned 4.4 gain.
  typedef logic signed [DW+KW:0] gprod_t;

  // Scale a gain product back to integer: round to nearest with halves away
  // from zero (no bias), then saturate to 8 bits.
  function automatic sdata_t gain_round_sat(input gprod_t p);
    logic signed [19:0] half, w;
    half = 20'sd1 <<< (KFRAC - 1);
    w    = 20'(p) + ((p < 0) ? half - 20'sd1 : half);
    return sat8(w >>> KFRAC);
  endfunction

  // Default content of the input fuzzy sets' memory for shifted input x.
  function automatic mf_word_t default_mf_word(input int unsigned x);
    mf_word_t    w;
    int unsigned f;
    if (x < 16) begin
      w.idx = set_idx_t'(0);
      w.mu  = MU_ONE;
    end else if (x >= 240) begin
      w.idx = set_idx_t'(NSETS - 2);
      w.mu  = '0;
    end else begin
      f     = (x - 16) % 32;
      w.idx = set_idx_t'((x - 16) / 32);
      w.mu  = mu_t'(63 - ((f * 63 + 16) / 32));
    end
    return w;
  endfunction

  // A rule table: consequent set number of each rule, indexed [rate][error].
  typedef logic [IDXW-1:0] rule_table_t [NSETS][NSETS];

  // Consequent set number of the rule (error set e, rate set r).
  localparam rule_table_t RULE_TABLE = '{
    //  e: NB    NM    NS    NZ    PZ    PS    PM    PB
    '{3'd0, 3'd0, 3'd0, 3'd1, 3'd1, 3'd2, 3'd3, 3'd4},  // r = NB
    '{3'd0, 3'd0, 3'd1, 3'd1, 3'd2, 3'd3, 3'd4, 3'd4},  // r = NM
    '{3'd0, 3'd1, 3'd1, 3'd2, 3'd3, 3'd4, 3'd4, 3'd5},  // r = NS
    '{3'd1, 3'd1, 3'd2, 3'd3, 3'd4, 3'd4, 3'd5, 3'd6},  // r = NZ
    '{3'd1, 3'd2, 3'd3, 3'd3, 3'd4, 3'd5, 3'd6, 3'd6},  // r = PZ
    '{3'd2, 3'd3, 3'd3, 3'd4, 3'd5, 3'd6, 3'd6, 3'd7},  // r = PS
    '{3'd3, 3'd3, 3'd4, 3'd5, 3'd6, 3'd6, 3'd7, 3'd7},  // r = PM
    '{3'd3, 3'd4, 3'd5, 3'd6, 3'd6, 3'd7, 3'd7, 3'd7}   // r = PB
  };

  // Output singleton positions in the shifted range: round(256*k/7), max 255.
  localparam udata_t SINGLETON [NSETS] = '{
    8'd0, 8'd37, 8'd73, 8'd110, 8'd146, 8'd183, 8'd219, 8'd255
  };

  // Content of the rule memory word at address {error set, rate set}.
  function automatic udata_t rule_word(input rule_table_t table_in,
                                       input logic [2*IDXW-1:0] addr);
    return SINGLETON[table_in[addr[IDXW-1:0]][addr[2*IDXW-1:IDXW]]];
  endfunction

endpackage
