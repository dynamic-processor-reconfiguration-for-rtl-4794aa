// morph_pkg: types and constants shared by the runtime management logic of the
// four-mode morphable out-of-order core.
//
// The core is one out-of-order pipeline whose reorder buffer (ROB), load/store
// queue (LSQ) and issue queue (IQ) are built from banks that can be powered off,
// whose fetch/decode/issue lanes can be switched off, and whose voltage and
// frequency can be changed. A "mode" is one combination of these settings. The
// four modes, their sizes, widths, frequencies and voltages, and the bank sizes
// (16 entries for ROB and LSQ, 8 for IQ) follow the published design; the
// encodings below (mode numbering, PMC numbering, fixed-point format, VCR/FCR
// units) are this implementation's own choices.
//
// Fixed point: every estimator quantity is a signed Q16.16 number in 32 bits.
package morph_pkg;

  // ---------------------------------------------------------------- modes
  localparam int unsigned NUM_MODES = 4;

  typedef enum logic [1:0] {
    MODE_AC = 2'd0,   // average core, the baseline mode
    MODE_NC = 2'd1,   // narrow core: high frequency, low ILP phases
    MODE_LW = 2'd2,   // larger window: window-bound phases
    MODE_SM = 2'd3    // small core: low-performance phases
  } mode_e;

  // ---------------------------------------------------------------- fixed point
  localparam int unsigned FX_W = 32;
  localparam int unsigned FX_F = 16;
  typedef logic signed [FX_W-1:0] fx_t;
  localparam fx_t FX_ONE = fx_t'(1 << FX_F);

  // ---------------------------------------------------------------- banks
  localparam int unsigned ROB_BANK   = 16;
  localparam int unsigned LSQ_BANK   = 16;
  localparam int unsigned IQ_BANK    = 8;
  localparam int unsigned ROB_MAX    = 256;   // largest ROB of any mode (LW)
  localparam int unsigned LSQ_MAX    = 128;   // largest LSQ (AC, LW)
  localparam int unsigned IQ_MAX     = 48;    // largest IQ (LW)
  localparam int unsigned ROB_BANKS  = ROB_MAX / ROB_BANK;   // 16
  localparam int unsigned LSQ_BANKS  = LSQ_MAX / LSQ_BANK;   // 8
  localparam int unsigned IQ_BANKS   = IQ_MAX / IQ_BANK;     // 6
  localparam int unsigned MAX_WIDTH  = 4;     // widest fetch/issue of any mode

  // ---------------------------------------------------------------- mode table
  typedef struct packed {
    logic [15:0] freq_mhz;   // core clock
    logic [15:0] volt_mv;    // supply voltage
    logic [8:0]  iq;         // issue queue entries
    logic [8:0]  lsq;        // load/store queue entries
    logic [8:0]  rob;        // reorder buffer entries
    logic [2:0]  fetch_w;    // fetch width (decoders follow it)
    logic [2:0]  issue_w;    // issue width
  } mode_cfg_t;

  function automatic mode_cfg_t mode_cfg(mode_e m);
    mode_cfg_t c;
    unique case (m)
      MODE_AC: c = '{freq_mhz: 16'd1600, volt_mv: 16'd800,  iq: 9'd36, lsq: 9'd128, rob: 9'd128, fetch_w: 3'd4, issue_w: 3'd4};
      MODE_NC: c = '{freq_mhz: 16'd2000, volt_mv: 16'd1000, iq: 9'd24, lsq: 9'd64,  rob: 9'd64,  fetch_w: 3'd2, issue_w: 3'd2};
      MODE_LW: c = '{freq_mhz: 16'd1400, volt_mv: 16'd800,  iq: 9'd48, lsq: 9'd128, rob: 9'd256, fetch_w: 3'd4, issue_w: 3'd4};
      default: c = '{freq_mhz: 16'd1200, volt_mv: 16'd700,  iq: 9'd12, lsq: 9'd16,  rob: 9'd16,  fetch_w: 3'd1, issue_w: 3'd1};
    endcase
    return c;
  endfunction

  // Banks needed to hold n entries of a structure with the given bank size.
  function automatic logic [4:0] banks_for(logic [8:0] n, int unsigned bank);
    return 5'((int'(n) + int'(bank) - 1) / int'(bank));
  endfunction

  // Frequency in GHz as Q16.16 (used by the IPS^2/Watt estimate).
  function automatic fx_t freq_ghz_fx(mode_e m);
    return fx_t'((64'(mode_cfg(m).freq_mhz) << FX_F) / 64'd1000);
  endfunction

  // PLL feedback divider written to the FCR: f = FCR x 100 MHz reference.
  function automatic logic [7:0] fcr_value(mode_e m);
    return 8'(mode_cfg(m).freq_mhz / 16'd100);
  endfunction

  // ---------------------------------------------------------------- PMCs
  // Quantities available to the estimator after each window. PMC_ONE is the
  // constant 1.0 so that an expression's intercept is just another MAC term.
  localparam int unsigned NUM_PMC = 14;
  typedef enum logic [3:0] {
    PMC_IPC  = 4'd0,   // committed instructions per cycle
    PMC_L1H  = 4'd1,   // L1 hits
    PMC_L1M  = 4'd2,   // L1 misses
    PMC_L2H  = 4'd3,   // L2 hits
    PMC_L2M  = 4'd4,   // L2 misses
    PMC_BMP  = 4'd5,   // branch mispredictions
    PMC_INT  = 4'd6,   // committed integer instructions
    PMC_FP   = 4'd7,   // committed floating-point instructions
    PMC_LD   = 4'd8,   // committed loads
    PMC_ST   = 4'd9,   // committed stores
    PMC_BR   = 4'd10,  // committed branches
    PMC_FI   = 4'd11,  // fetched instructions
    PMC_DS   = 4'd12,  // dispatch stalls on a full ROB/LSQ/IQ/RAT (cycles)
    PMC_ONE  = 4'd13   // constant 1.0
  } pmc_e;

  typedef fx_t pmc_vec_t [NUM_PMC];

  // Events reported by the core pipeline in one cycle.
  typedef struct packed {
    logic [2:0] commit;     // instructions committed this cycle
    logic [2:0] fetched;    // instructions fetched this cycle
    logic [2:0] l1_hit;
    logic [2:0] l1_miss;
    logic [2:0] l2_hit;
    logic [2:0] l2_miss;
    logic [2:0] br_misp;
    logic [2:0] c_int;
    logic [2:0] c_fp;
    logic [2:0] c_ld;
    logic [2:0] c_st;
    logic [2:0] c_br;
    logic       disp_stall; // dispatch blocked by a full buffer this cycle
  } pmc_event_t;

  // ---------------------------------------------------------------- estimator
  // Eight expressions per current mode: the power of each mode, then the IPC of
  // each mode. The IPC of the current mode is measured, so its slot is unused.
  localparam int unsigned NUM_EXPR  = 2 * NUM_MODES;
  localparam int unsigned NUM_TERMS = 5;

  typedef struct packed {
    pmc_e sel;
    fx_t  coef;
  } term_t;

  // Default regression terms (current mode AC), from the published fit; each
  // coefficient is round(c x 65536), with c given in the comment.
  // e = 0..3 : power of AC, NC, LW, SM;  e = 4..7 : IPC of AC, NC, LW, SM.
  function automatic term_t default_term(int unsigned e, int unsigned t);
    term_t z;
    z = '{sel: PMC_ONE, coef: '0};
    case (e)
      0: case (t)
           0: return '{sel: PMC_L1H, coef: fx_t'(918)}; // 1.40e-2
           1: return '{sel: PMC_IPC, coef: fx_t'(905052)}; // 13.81
           2: return '{sel: PMC_ST,  coef: fx_t'(1933)}; // 2.95e-2
           3: return '{sel: PMC_BMP, coef: fx_t'(-773)}; // -1.18e-2
           4: return '{sel: PMC_ONE, coef: fx_t'(-19005)}; // -0.29
           default: return z;
         endcase
      1: case (t)
           0: return '{sel: PMC_BMP, coef: fx_t'(-85197)}; // -1.30
           1: return '{sel: PMC_L1M, coef: fx_t'(-55706)}; // -0.85
           2: return '{sel: PMC_BR,  coef: fx_t'(26870)}; // 0.41
           3: return '{sel: PMC_ST,  coef: fx_t'(1507)}; // 2.30e-2
           4: return '{sel: PMC_ONE, coef: fx_t'(30147)}; // 0.46
           default: return z;
         endcase
      2: case (t)
           0: return '{sel: PMC_L2M, coef: fx_t'(-22282)}; // -0.34
           1: return '{sel: PMC_LD,  coef: fx_t'(-68157)}; // -1.04
           2: return '{sel: PMC_BMP, coef: fx_t'(-36700)}; // -0.56
           3: return '{sel: PMC_L1H, coef: fx_t'(-918)}; // -1.40e-2
           4: return '{sel: PMC_ONE, coef: fx_t'(6554)}; // 0.1
           default: return z;
         endcase
      3: case (t)
           0: return '{sel: PMC_L1M, coef: fx_t'(-203162)}; // -3.10
           1: return '{sel: PMC_IPC, coef: fx_t'(437)}; // 6.67e-3
           2: return '{sel: PMC_BMP, coef: fx_t'(-2753)}; // -4.20e-2
           3: return '{sel: PMC_ONE, coef: fx_t'(17695)}; // 0.27
           default: return z;
         endcase
      5: case (t)   // IPC NC
           0: return '{sel: PMC_BR,  coef: fx_t'(7340)}; // 1.12e-1
           1: return '{sel: PMC_IPC, coef: fx_t'(118620)}; // 1.81
           2: return '{sel: PMC_ST,  coef: fx_t'(2556)}; // 3.9e-2
           3: return '{sel: PMC_L2H, coef: fx_t'(-773)}; // -1.18e-2
           4: return '{sel: PMC_ONE, coef: fx_t'(24904)}; // 0.38
           default: return z;
         endcase
      6: case (t)   // IPC LW
           0: return '{sel: PMC_IPC, coef: fx_t'(7864)}; // 0.12
           1: return '{sel: PMC_L1H, coef: fx_t'(-118620)}; // -1.81
           2: return '{sel: PMC_ST,  coef: fx_t'(20316)}; // 0.31
           3: return '{sel: PMC_L1M, coef: fx_t'(-80609)}; // -1.23
           4: return '{sel: PMC_ONE, coef: fx_t'(19005)}; // 0.29
           default: return z;
         endcase
      7: case (t)   // IPC SM
           0: return '{sel: PMC_L1H, coef: fx_t'(13763)}; // 0.21
           1: return '{sel: PMC_IPC, coef: fx_t'(59638)}; // 0.91
           2: return '{sel: PMC_LD,  coef: fx_t'(7209)}; // 0.11
           3: return '{sel: PMC_BMP, coef: fx_t'(-7864)}; // -0.12
           4: return '{sel: PMC_ONE, coef: fx_t'(292291)}; // 4.46
           default: return z;
         endcase
      default: return z;   // e = 4: IPC of AC is measured while in AC
    endcase
  endfunction

endpackage
