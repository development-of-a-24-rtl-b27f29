// jtag_tap: IEEE 1149.1 test access port giving access to the control and
// status registers, the memory self test, the I/O pins and a set of internal
// registers.
//
// The 16-state TAP controller follows TMS on the rising edge of TCK; TDO
// changes on the falling edge and is driven only while shifting. The
// instruction register is 4 bits wide (captures 0001). Instructions:
//   0001 IDCODE   32-bit identification register
//   0010 SAMPLE   BSW-bit boundary register: Capture-DR samples the chip's
//                 pins (pins[0] nearest TDO); observation only
//   1011 DEBUG    DBW-bit register: Capture-DR samples internal state
//                 (buffer pointers, occupancies, counters)
//   1000 CONTROL  180-bit chain of all control registers (CSR0 bit 0 is the
//                 bit nearest TDO); Capture-DR loads the current contents,
//                 Update-DR writes the chain into the registers
//   1001 STATUS   72-bit chain of the status registers, capture only
//   1010 BIST     6-bit register: captures {fail[2:0], done[2:0]}; Update-DR
//                 with bit 0 set starts the self test of all memories
//   others        BYPASS (1-bit register); this includes EXTEST, since the
//                 boundary cells here only observe the pins and cannot drive
//                 them
// Updates cross into the system clock domain as toggles through two
// flip-flops and come out as one-cycle pulses (ctrl_load, bist_start), with
// ctrl_data held stable meanwhile. Captured values from the clk domain are
// quasi-static and sampled directly. The chip uses JTAG for boundary scan,
// register set-up and BIST; the codes, chain order and IDCODE value are this
// design's choices.
`timescale 1ps/1ps
module jtag_tap
  import amt_pkg::*;
#(
  parameter logic [31:0] IDCODE = 32'h1A71_0001,
  parameter int unsigned BSW    = 64,
  parameter int unsigned DBW    = 42
) (
  input  logic       tck,
  input  logic       tms,
  input  logic       tdi,
  input  logic       trst_n,
  output logic       tdo,
  output logic       tdo_en,
  input  logic       clk,
  input  logic       rst_n,
  input  ctrl_regs_t ctrl_now,
  input  stat_regs_t stat_now,
  input  logic [2:0] bist_done,
  input  logic [2:0] bist_fail,
  input  logic [BSW-1:0] pins,
  input  logic [DBW-1:0] debug,
  output ctrl_regs_t ctrl_data,
  output logic       ctrl_load,
  output logic       bist_start
);

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_e;

  localparam logic [3:0] I_IDCODE  = 4'b0001;
  localparam logic [3:0] I_CONTROL = 4'b1000;
  localparam logic [3:0] I_STATUS  = 4'b1001;
  localparam logic [3:0] I_BIST    = 4'b1010;
  localparam logic [3:0] I_SAMPLE  = 4'b0010;
  localparam logic [3:0] I_DEBUG   = 4'b1011;
  localparam int unsigned CW = NCTRL * REG_W;
  localparam int unsigned SW = NSTAT * REG_W;

  tap_e        st, st_n;
  logic [3:0]  ir, ir_sh;
  logic [CW-1:0] dr;           // shared shift register, longest chain
  logic        ctrl_tog, bist_tog;
  logic [2:0]  ctrl_s, bist_s;

  always_comb begin
    unique case (st)
      TLR:    st_n = tms ? TLR    : RTI;
      RTI:    st_n = tms ? SEL_DR : RTI;
      SEL_DR: st_n = tms ? SEL_IR : CAP_DR;
      CAP_DR: st_n = tms ? EX1_DR : SH_DR;
      SH_DR:  st_n = tms ? EX1_DR : SH_DR;
      EX1_DR: st_n = tms ? UPD_DR : PAU_DR;
      PAU_DR: st_n = tms ? EX2_DR : PAU_DR;
      EX2_DR: st_n = tms ? UPD_DR : SH_DR;
      UPD_DR: st_n = tms ? SEL_DR : RTI;
      SEL_IR: st_n = tms ? TLR    : CAP_IR;
      CAP_IR: st_n = tms ? EX1_IR : SH_IR;
      SH_IR:  st_n = tms ? EX1_IR : SH_IR;
      EX1_IR: st_n = tms ? UPD_IR : PAU_IR;
      PAU_IR: st_n = tms ? EX2_IR : PAU_IR;
      EX2_IR: st_n = tms ? UPD_IR : SH_IR;
      UPD_IR: st_n = tms ? SEL_DR : RTI;
      default: st_n = TLR;
    endcase
  end

  // length of the selected data register
  function automatic int unsigned dr_len(input logic [3:0] i);
    unique case (i)
      I_IDCODE:  return 32;
      I_CONTROL: return CW;
      I_STATUS:  return SW;
      I_BIST:    return 6;
      I_SAMPLE:  return BSW;
      I_DEBUG:   return DBW;
      default:   return 1;
    endcase
  endfunction

  function automatic logic [CW-1:0] flat_ctrl(input ctrl_regs_t r);
    return CW'(r);
  endfunction

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      st <= TLR; ir <= I_IDCODE; ir_sh <= '0; dr <= '0;
      ctrl_data <= CTRL_RESET; ctrl_tog <= 1'b0; bist_tog <= 1'b0;
    end else begin
      st <= st_n;
      unique case (st)
        TLR:    ir <= I_IDCODE;
        CAP_IR: ir_sh <= 4'b0001;
        SH_IR:  ir_sh <= {tdi, ir_sh[3:1]};
        UPD_IR: ir <= ir_sh;
        CAP_DR: begin
          unique case (ir)
            I_IDCODE:  dr <= CW'(IDCODE);
            I_CONTROL: dr <= flat_ctrl(ctrl_now);
            I_STATUS:  dr <= CW'(stat_now);
            I_BIST:    dr <= CW'({bist_fail, bist_done});
            I_SAMPLE:  dr <= CW'(pins);
            I_DEBUG:   dr <= CW'(debug);
            default:   dr <= '0;
          endcase
        end
        SH_DR: begin
          dr <= dr >> 1;
          dr[dr_len(ir)-1] <= tdi;
        end
        UPD_DR: begin
          if (ir == I_CONTROL) begin
            ctrl_data <= ctrl_regs_t'(dr);
            ctrl_tog  <= ~ctrl_tog;
          end
          if (ir == I_BIST && dr[0]) bist_tog <= ~bist_tog;
        end
        default: ;
      endcase
    end
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo <= 1'b0; tdo_en <= 1'b0;
    end else begin
      tdo    <= (st == SH_IR) ? ir_sh[0] : dr[0];
      tdo_en <= (st == SH_IR) || (st == SH_DR);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_s <= '0; bist_s <= '0;
    end else begin
      ctrl_s <= {ctrl_s[1:0], ctrl_tog};
      bist_s <= {bist_s[1:0], bist_tog};
    end
  end

  assign ctrl_load  = ctrl_s[2] ^ ctrl_s[1];
  assign bist_start = bist_s[2] ^ bist_s[1];

endmodule
