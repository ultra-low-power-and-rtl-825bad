// enc_ref_pkg -- reference line codes for the multimode encoder testbenches.
//
// The functions here produce the two half-bit levels (first half, second half)
// of one encoded bit straight from the coding rules, without reference to the
// encoder's circuit:
//   Manchester: a 0 is sent high then low, a 1 low then high.
//   FM0: the level always changes at the start of a bit; a 0 changes again in
//        mid-bit, a 1 does not.
//   differential Manchester: the level always changes in mid-bit; a 0 also
//        changes at the start of the bit, a 1 does not.
// `last` is the line level at the end of the previous bit.
package enc_ref_pkg;
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [1:0] {
    MODE_MANCHESTER = 2'd0,
    MODE_FM0        = 2'd1,
    MODE_DIFF_MAN   = 2'd2
  } enc_mode_e;

  typedef struct packed {
    logic m1;
    logic m2;
    logic clr;
  } mode_pins_t;

  // Control pin setting of each mode.
  function automatic mode_pins_t pins_of(enc_mode_e mode);
    case (mode)
      MODE_MANCHESTER: return '{m1: 1'b1, m2: 1'b1, clr: 1'b0};
      MODE_FM0:        return '{m1: 1'b0, m2: 1'b1, clr: 1'b1};
      default:         return '{m1: 1'b1, m2: 1'b1, clr: 1'b1};
    endcase
  endfunction

  // Returns {first half, second half}.
  function automatic logic [1:0] encode_bit(enc_mode_e mode, logic last, logic d);
    logic y, z;
    case (mode)
      MODE_MANCHESTER: begin y = ~d;    z = d;                 end
      MODE_FM0:        begin y = ~last; z = d ? y : ~y;        end
      default:         begin y = d ? last : ~last; z = ~y;     end
    endcase
    return {y, z};
  endfunction
endpackage
