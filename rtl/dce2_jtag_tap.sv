// dce2_jtag_tap: JTAG test access port controller of the DCE2 test chip.
//
// The IEEE 1149.1 TAP state machine with a 4-bit instruction register and an internal 1-bit
// bypass and 32-bit IDCODE register.  The JTAG pins are oversampled in the core clock domain: TCK
// is synchronised and its rising and falling edges become one-clock enables, so the whole test
// chip, scan chains included, runs on one clock (clk must be at least four times TCK).  TDI/TMS
// are sampled on the TCK rise, TDO changes on the TCK fall.  The document shows a "JTAG ctrl" and
// its chains; the oversampling scheme and the IDCODE are this design's own.
//
// Data registers outside this module see one-clock pulses: dr_capture, dr_shift, dr_update, and
// the current instruction ir.  They return their serial output on dr_tdo.
module dce2_jtag_tap
  import dce2_jtag_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tck,
  input  logic           tms,
  input  logic           tdi,
  input  logic           trst_n,
  output logic           tdo,
  output logic           tdo_en,
  output logic [IRW-1:0] ir,
  output logic           dr_capture,
  output logic           dr_shift,
  output logic           dr_update,
  output logic           tdi_s,
  input  logic           dr_tdo
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_e;

  tap_e           st;
  logic [2:0]     tck_s;
  logic [1:0]     tms_s, tdi_ss, trst_s;
  logic           rise, fall;
  logic [IRW-1:0] ir_sh;
  logic           byp;
  logic [31:0]    idr;
  logic           int_tdo;

  assign rise  = tck_s[1] & ~tck_s[2];
  assign fall  = ~tck_s[1] & tck_s[2];
  assign tdi_s = tdi_ss[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tck_s  <= '0;
      tms_s  <= '1;
      tdi_ss <= '0;
      trst_s <= '0;
    end else begin
      tck_s  <= {tck_s[1:0], tck};
      tms_s  <= {tms_s[0], tms};
      tdi_ss <= {tdi_ss[0], tdi};
      trst_s <= {trst_s[0], trst_n};
    end
  end

  function automatic tap_e next(input tap_e s, input logic m);
    unique case (s)
      TLR:    return m ? TLR    : RTI;
      RTI:    return m ? SEL_DR : RTI;
      SEL_DR: return m ? SEL_IR : CAP_DR;
      CAP_DR: return m ? EX1_DR : SH_DR;
      SH_DR:  return m ? EX1_DR : SH_DR;
      EX1_DR: return m ? UPD_DR : PAU_DR;
      PAU_DR: return m ? EX2_DR : PAU_DR;
      EX2_DR: return m ? UPD_DR : SH_DR;
      UPD_DR: return m ? SEL_DR : RTI;
      SEL_IR: return m ? TLR    : CAP_IR;
      CAP_IR: return m ? EX1_IR : SH_IR;
      SH_IR:  return m ? EX1_IR : SH_IR;
      EX1_IR: return m ? UPD_IR : PAU_IR;
      PAU_IR: return m ? EX2_IR : PAU_IR;
      EX2_IR: return m ? UPD_IR : SH_IR;
      UPD_IR: return m ? SEL_DR : RTI;
      default: return TLR;
    endcase
  endfunction

  assign dr_capture = rise && (st == CAP_DR);
  assign dr_shift   = rise && (st == SH_DR);
  assign dr_update  = fall && (st == UPD_DR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= TLR;
      ir    <= IR_IDCODE;
      ir_sh <= '0;
      byp   <= 1'b0;
      idr   <= '0;
    end else if (!trst_s[1]) begin
      st <= TLR;
      ir <= IR_IDCODE;
    end else begin
      if (rise) begin
        st <= next(st, tms_s[1]);
        unique case (st)
          CAP_IR: ir_sh <= IRW'(1);                       // 1149.1: LSBs 01
          SH_IR:  ir_sh <= {tdi_s, ir_sh[IRW-1:1]};
          CAP_DR: begin byp <= 1'b0; idr <= IDCODE; end
          SH_DR:  begin byp <= tdi_s; idr <= {tdi_s, idr[31:1]}; end
          default: ;
        endcase
      end
      if (fall) begin
        if (st == TLR)    ir <= IR_IDCODE;
        if (st == UPD_IR) ir <= ir_sh;
      end
    end
  end

  always_comb begin
    unique case (ir)
      IR_IDCODE: int_tdo = idr[0];
      IR_BYPASS: int_tdo = byp;
      default:   int_tdo = dr_tdo;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else if (fall) begin
      tdo    <= (st == SH_IR) ? ir_sh[0] : int_tdo;
      tdo_en <= (st == SH_IR) || (st == SH_DR);
    end
  end
endmodule
