// Shared types and constants for the modular-reduction units and the
// butterfly that uses them.
//
// red_kind_e names the four reduction datapaths; the butterfly and the top
// use it to pick which one a lane carries. pipe_cfg_e selects the two
// pipelining options of the shift-add reductions: PIPE_A registers the
// shifted terms and their sum in separate cycles, PIPE_B does each shift
// and add in one cycle. The DSP tile sizes are those of a 26x17 unsigned
// multiplier slice, the target the reductions are tiled for.
package modred_pkg;

  typedef enum logic [1:0] {
    RED_WLM_MIXED   = 2'd0,  // mixed-radix word-level Montgomery, result a*2^-beta
    RED_K2RED       = 2'd1,  // K^2-RED with multipliers, result a*2^-(2*omega)
    RED_K2RED_SHIFT = 2'd2,  // K^2-RED with barrel shifters, result a*2^-(2*omega)
    RED_MONT_SHIFT  = 2'd3   // Montgomery with barrel shifters, result a*2^-beta
  } red_kind_e;

  typedef enum logic {
    PIPE_A = 1'b0,  // shifts and additions in separate cycles
    PIPE_B = 1'b1   // shift and addition in the same cycle
  } pipe_cfg_e;

  // Operand sizes of one DSP multiplier slice (unsigned A x B).
  localparam int unsigned DSP_GAMMA_A = 26;
  localparam int unsigned DSP_GAMMA_B = 17;

  // Default coefficient modulus width.
  localparam int unsigned BETA_DEFAULT = 64;

  // Exponent k of the factor 2^-k that a reduction leaves in its result.
  function automatic int unsigned red_exponent(red_kind_e kind, int unsigned beta,
                                               int unsigned logqh);
    if (kind == RED_K2RED || kind == RED_K2RED_SHIFT) return 2 * (beta - logqh);
    return beta;
  endfunction

  // Latency in cycles of each reduction datapath.
  function automatic int unsigned red_latency(red_kind_e kind, pipe_cfg_e pipe);
    case (kind)
      RED_WLM_MIXED:   return 5;
      RED_K2RED:       return 5;
      RED_K2RED_SHIFT: return (pipe == PIPE_A) ? 5 : 3;
      default:         return (pipe == PIPE_A) ? 6 : 4;
    endcase
  endfunction

endpackage
