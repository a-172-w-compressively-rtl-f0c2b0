// cfg_regs: configuration registers of the control unit.
//
// Hold the programmable settings of the readout: compression ratio and
// power-down mode for the timing control, and the gain and bandwidth settings
// of the analog front end (TIA gain and feedback capacitor, integrator
// capacitor, IDAC current). The original ASIC lists these settings and their
// ranges; the register map below and its simple synchronous write port
// are this design's:
//   addr 0: [1:0] compression ratio (0:1x 1:8x 2:10x 3:30x), [2] power-down
//   addr 1: [1:0] TIA gain, [5:2] TIA feedback capacitor
//   addr 2: [2:0] integrator capacitor
//   addr 3: [4:0] IDAC code
// A write takes effect at the clock edge; reset loads 1x, power-down off,
// and all front-end codes zero. rdata_o returns the register at raddr_i.
module cfg_regs
  import ppg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we_i,
  input  logic [1:0] addr_i,
  input  logic [7:0] wdata_i,
  input  logic [1:0] raddr_i,
  output logic [7:0] rdata_o,
  output cr_e        cr_o,
  output logic       pd_en_o,
  output afe_cfg_t   afe_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr_o    <= CR_1X;
      pd_en_o <= 1'b0;
      afe_o   <= '0;
    end else if (we_i) begin
      unique case (addr_i)
        2'd0: begin cr_o <= cr_e'(wdata_i[1:0]); pd_en_o <= wdata_i[2]; end
        2'd1: begin afe_o.tia_gain <= wdata_i[1:0]; afe_o.tia_cf <= wdata_i[5:2]; end
        2'd2: afe_o.si_cint <= wdata_i[2:0];
        default: afe_o.idac <= wdata_i[4:0];
      endcase
    end
  end

  always_comb begin
    unique case (raddr_i)
      2'd0:    rdata_o = {5'd0, pd_en_o, cr_o};
      2'd1:    rdata_o = {2'd0, afe_o.tia_cf, afe_o.tia_gain};
      2'd2:    rdata_o = {5'd0, afe_o.si_cint};
      default: rdata_o = {3'd0, afe_o.idac};
    endcase
  end

endmodule
