// rasp_tmr_pkg: types and helpers shared by the c17 TMR design.
//
// The TMR copies of c17 accept a fault-injection command made of a 2-bit
// fault number (one of four fault locations per copy, "faultIn" in the
// module ports) and a fault mode. The document injects bit-flip and
// stuck-at-1/0 faults; the encoding of the mode below, and the extra
// FM_NONE value that leaves a copy fault-free, are this design's own choice.
// fault_apply() is the single place where a fault changes a net value.
package rasp_tmr_pkg;

  // Fault model applied at the selected location of one TMR copy.
  typedef enum logic [1:0] {
    FM_NONE = 2'd0,  // copy runs fault-free
    FM_FLIP = 2'd1,  // selected net is inverted (bit-flip)
    FM_SA0  = 2'd2,  // selected net is forced to 0
    FM_SA1  = 2'd3   // selected net is forced to 1
  } fault_mode_e;

  // Fault locations of one c17 copy: the four internal NAND outputs.
  typedef logic [1:0] fault_sel_t;

  localparam fault_sel_t SITE_N10 = 2'd0;
  localparam fault_sel_t SITE_N11 = 2'd1;
  localparam fault_sel_t SITE_N16 = 2'd2;
  localparam fault_sel_t SITE_N19 = 2'd3;

  // Value of a net after fault injection. 'hit' is 1 when this net is the
  // selected fault location.
  function automatic logic fault_apply(logic value, fault_mode_e mode, logic hit);
    if (!hit) return value;
    unique case (mode)
      FM_FLIP: return ~value;
      FM_SA0:  return 1'b0;
      FM_SA1:  return 1'b1;
      default: return value;
    endcase
  endfunction

endpackage
