// fe_stim_pkg: stimulus patterns for the front-end testbenches.
//
// Each 256-crossing group uses one pattern:
//   P_PED     all samples inside the short window (no long data)
//   P_QUIET   about 6 % of the samples far from the pedestal
//   P_BUSY    about 20 % long samples, spread at random
//   P_WORST   192 lines without long data, then 64 lines with 8 long values
//             (exactly 512 long bytes: the scheme's worst timing case)
//   P_FLOOD   about 40 % long samples: the 512 budget overflows mid-group
//   P_EDGE    values on both borders of the short window
//
// The worst case is the scheme's own; the other patterns and their rates
// are this testbench suite's choice.
package fe_stim_pkg;
  typedef enum int {P_PED, P_QUIET, P_BUSY, P_WORST, P_FLOOD, P_EDGE} pattern_e;

  function automatic logic [11:0] pedestal();
    return 12'(240 + ($urandom % 32));
  endfunction

  function automatic logic [11:0] far_value();
    logic [11:0] v;
    do v = 12'($urandom); while (v >= 240 && v < 272);
    return v;
  endfunction

  function automatic logic [11:0] sample(pattern_e p, int line, int ch);
    case (p)
      P_PED:   return pedestal();
      P_QUIET: return ($urandom % 100 < 6)  ? far_value() : pedestal();
      P_BUSY:  return ($urandom % 100 < 20) ? far_value() : pedestal();
      P_WORST: return (line >= 192) ? far_value() : pedestal();
      P_FLOOD: return ($urandom % 100 < 40) ? far_value() : pedestal();
      default: begin
        int unsigned r = $urandom % 6;
        case (r)
          0: return 12'd239;  1: return 12'd240;  2: return 12'd271;
          3: return 12'd272;  4: return 12'd0;    default: return 12'hFFF;
        endcase
      end
    endcase
  endfunction
endpackage
