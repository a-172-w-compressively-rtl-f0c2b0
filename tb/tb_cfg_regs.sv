// tb_cfg_regs: checks reset values, then writes random values to every
// register and checks the decoded outputs and the read-back.
module tb_cfg_regs;
  import ppg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0; logic [1:0] addr = 0, raddr = 0; logic [7:0] wdata = 0, rdata;
  cr_e cr; logic pd; afe_cfg_t afe;
  logic [7:0] r [4];
  cfg_regs dut (.clk, .rst_n, .we_i(we), .addr_i(addr), .wdata_i(wdata), .raddr_i(raddr),
                .rdata_o(rdata), .cr_o(cr), .pd_en_o(pd), .afe_o(afe));
  always #5 clk = ~clk;
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(cr == CR_1X && !pd && afe == '0, "reset values");
    r = '{default: 8'h00};
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = 1; addr = 2'($urandom); wdata = 8'($urandom);
      @(posedge clk); #1;
      we = 0;
      case (addr)
        2'd0: r[0] = {5'd0, wdata[2:0]};
        2'd1: r[1] = {2'd0, wdata[5:0]};
        2'd2: r[2] = {5'd0, wdata[2:0]};
        default: r[3] = {3'd0, wdata[4:0]};
      endcase
      check(cr == cr_e'(r[0][1:0]) && pd == r[0][2], "cr/pd");
      check(afe.tia_gain == r[1][1:0] && afe.tia_cf == r[1][5:2], "tia");
      check(afe.si_cint == r[2][2:0] && afe.idac == r[3][4:0], "si/idac");
      for (int a = 0; a < 4; a++) begin
        raddr = 2'(a); #1;
        check(rdata == r[a], $sformatf("readback %0d: %h exp %h", a, rdata, r[a]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
