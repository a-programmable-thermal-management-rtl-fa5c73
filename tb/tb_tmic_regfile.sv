// tb_tmic_regfile: checks reset values, register loading from the write
// strobes, the read-back mux (including the read-only flag and the zero low
// nibble of the configuration byte) and that a strobe touches only its own
// register. Expected values come from a scoreboard kept in the testbench.
module tb_tmic_regfile;
  import tmic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  reg_wr_t wr;
  rd_sel_e rd_sel;
  logic flag;
  logic [7:0] temp, rdata, sample, thresh;
  logic ie;
  sensor_sel_e sel;
  int checks = 0, failures = 0;
  // scoreboard
  logic m_ie; logic [1:0] m_sel; logic [7:0] m_sample, m_thresh;

  tmic_regfile #(.W(8)) dut (.clk, .rst_n, .wr, .rd_sel, .flag, .temp,
                             .rdata, .ie, .sel, .sample, .thresh);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic read_all;
    rd_sel = RD_CFG; #1;
    check(rdata == {flag, m_ie, m_sel, 4'b0000}, $sformatf("cfg read %b", rdata));
    rd_sel = RD_SAMPLE; #1; check(rdata == m_sample, "sample read");
    rd_sel = RD_THRESH; #1; check(rdata == m_thresh, "thresh read");
    rd_sel = RD_TEMP;   #1; check(rdata == temp, "temp read");
    rd_sel = RD_NONE;   #1; check(rdata == 8'h00, "no read selected");
    check(ie == m_ie && sel == sensor_sel_e'(m_sel) && sample == m_sample && thresh == m_thresh,
          "register outputs");
  endtask

  initial begin
    wr = '0; rd_sel = RD_NONE; flag = 1'b0; temp = 8'h5A;
    m_ie = 0; m_sel = 0; m_sample = 8'hFF; m_thresh = 8'hFF;
    @(negedge clk);
    read_all();
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      automatic int which = $urandom_range(0, 3);
      wr = '0;
      wr.wdata = 8'($urandom);
      wr.cfg_we = (which == 0);
      wr.sample_we = (which == 1);
      wr.thresh_we = (which == 2);
      flag = 1'($urandom);
      temp = 8'($urandom);
      @(posedge clk);
      case (which)
        0: begin m_ie = wr.wdata[6]; m_sel = wr.wdata[5:4]; end
        1: m_sample = wr.wdata;
        2: m_thresh = wr.wdata;
        default: ;
      endcase
      @(negedge clk);
      wr = '0;
      read_all();
    end
    // the flag bit cannot be written
    wr = '0; wr.cfg_we = 1'b1; wr.wdata = 8'h80; flag = 1'b0;
    @(posedge clk); m_ie = 0; m_sel = 0;
    @(negedge clk); wr = '0;
    rd_sel = RD_CFG; #1;
    check(rdata[7] == 1'b0, "flag is read-only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
