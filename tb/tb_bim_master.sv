// tb_bim_master: self-checking test of the processor bus interface model.
// The testbench plays arbiter and bus control unit: it grants the bus and
// answers READY after random delays, and checks per clock that BReq, the
// strobes, address, write data, done and the read data follow the bus
// transaction sequence: strobe exactly two clocks after the grant, held
// until READY, released with BReq one clock after READY.
module tb_bim_master;
  import cfsm_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  cmd_valid = 1'b0, cmd_rw = 1'b1;
  addr_t cmd_addr = '0;
  data_t cmd_wdata = '0;
  logic  cmd_ready, done;
  data_t done_rdata;
  logic  breq, grant = 1'b0;
  addr_t addr;
  data_t wdata;
  logic  rd_n, wr_n, ready = 1'b0;
  data_t rdata = '0;
  int checks = 0, failures = 0;
  int n_rd = 0, n_wr = 0;

  bim_master dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic transaction(input logic rw, input addr_t a, input data_t wd,
                             input data_t rd, input int gdly, input int rdly);
    @(negedge clk);
    chk(cmd_ready, "ready for a command");
    cmd_valid = 1'b1; cmd_rw = rw; cmd_addr = a; cmd_wdata = wd;
    @(posedge clk); #1;
    chk(breq && rd_n && wr_n, "BReq raised, no strobe");
    @(negedge clk); cmd_valid = 1'b0; cmd_addr = '0; cmd_wdata = '0;
    for (int i = 0; i < gdly; i++) begin
      @(posedge clk); #1;
      chk(breq && rd_n && wr_n && !done, "waiting for grant");
    end
    @(negedge clk); grant = 1'b1;
    @(posedge clk); #1;
    chk(breq && rd_n && wr_n, "State1: no strobe yet");
    @(posedge clk); #1;
    chk(addr == a && (rw ? (!rd_n && wr_n) : (rd_n && !wr_n && wdata == wd)),
        "State2: strobe two clocks after grant, address and data driven");
    for (int i = 0; i < rdly; i++) begin
      @(posedge clk); #1;
      chk((rw ? !rd_n : !wr_n) && breq && !done && addr == a, "strobe held until READY");
    end
    @(negedge clk); ready = 1'b1; rdata = rd;
    @(posedge clk); #1;
    chk(done && rd_n && wr_n && !breq, "READY ends the transfer in one clock");
    if (rw) chk(done_rdata == rd, "read data taken");
    @(negedge clk); ready = 1'b0; rdata = 16'hDEAD; grant = 1'b0;
    @(posedge clk); #1;
    chk(!done && cmd_ready, "back to Idle");
    if (rw) chk(done_rdata == rd, "read data held");
    if (rw) n_rd++; else n_wr++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(!breq && rd_n && wr_n && cmd_ready && !done, "reset state");
    transaction(1'b1, 24'h000105, 16'h0, 16'h1234, 0, 0);
    transaction(1'b0, 24'h000208, 16'hBEEF, 16'h0, 3, 2);
    for (int t = 0; t < 200; t++)
      transaction(1'($urandom), addr_t'($urandom), data_t'($urandom),
                  data_t'($urandom), $urandom % 5, $urandom % 5);
    chk(n_rd > 50 && n_wr > 50, "reads and writes both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
