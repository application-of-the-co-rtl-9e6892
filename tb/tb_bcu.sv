// tb_bcu: self-checking test of the bus control unit.
// The testbench plays the granted bus master and the eight interfaces. For
// random transfers it checks that the request event goes to the interface
// named by addr[2:0] one clock after the strobe, with the master's address,
// data and direction; that READY stays low while the acknowledge is absent
// and rises one clock after it with the interface's data; that the
// acknowledge is consumed; that a strobe still low during READY does not
// start a second transfer; and that losing the grant returns it to Idle.
module tb_bcu;
  import cfsm_pkg::*;
  localparam int NT = 8;
  logic      clk = 1'b0, rst_n = 1'b0;
  logic      grant_any = 1'b0, rd_n = 1'b1, wr_n = 1'b1;
  addr_t     addr = '0;
  data_t     wdata = '0;
  logic      ready;
  data_t     rdata;
  logic [NT-1:0] req_emit, ack_present = '0, ack_detect;
  xfer_req_t req_val;
  data_t     ack_val [NT];
  logic [SEL_W-1:0] nature;
  int checks = 0, failures = 0;
  int per_nature [NT];

  bcu #(.N_TGT(NT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
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

  task automatic xfer(input logic rw, input addr_t a, input data_t wd,
                      input data_t answer, input int ack_dly);
    int k;
    k = int'(a[2:0]);
    @(negedge clk);
    grant_any = 1'b1;
    @(posedge clk); #1;                     // Idle -> CommuNature
    chk(req_emit == '0, "nothing requested before the strobe");
    @(negedge clk);
    addr = a; wdata = wd; rd_n = !rw; wr_n = rw;
    @(posedge clk); #1;
    chk(req_emit == (NT'(1) << k), "request to the interface named by addr[2:0]");
    chk(req_val.rw == rw && req_val.addr == a && (rw || req_val.wdata == wd),
        "request carries direction, address and data");
    chk(nature == a[2:0], "communication nature");
    for (int i = 0; i < ack_dly; i++) begin
      @(posedge clk); #1;
      chk(!ready && req_emit == '0, "waiting on data");
    end
    @(negedge clk);
    ack_present[k] = 1'b1; ack_val[k] = answer;
    #1 chk(ack_detect == (NT'(1) << k), "acknowledge consumed");
    @(posedge clk); #1;
    ack_present[k] = 1'b0; ack_val[k] = 16'h0;
    chk(ready && rdata == answer, "READY with latched data one clock after ack");
    @(posedge clk); #1;                     // master still strobing this clock
    chk(!ready && req_emit == '0, "READY is a pulse, no restart on old strobe");
    @(negedge clk);
    rd_n = 1'b1; wr_n = 1'b1; grant_any = 1'b0;
    @(posedge clk); #1;
    @(posedge clk); #1;
    chk(req_emit == '0 && !ready, "idle after release");
    per_nature[k]++;
  endtask

  initial begin
    for (int i = 0; i < NT; i++) begin ack_val[i] = '0; per_nature[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(!ready && req_emit == '0, "reset state");
    xfer(1'b1, 24'h000011, 16'h0, 16'hA1A1, 0);
    xfer(1'b0, 24'h000020, 16'h5555, 16'h0, 3);
    // grant lost before any strobe: back to Idle, nothing requested
    @(negedge clk); grant_any = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk); grant_any = 1'b0;
    @(posedge clk); #1;
    @(negedge clk); rd_n = 1'b0; addr = 24'h000003;
    repeat (3) begin @(posedge clk); #1 chk(req_emit == '0, "no grant, no request"); end
    @(negedge clk); rd_n = 1'b1;
    for (int t = 0; t < 400; t++)
      xfer(1'($urandom), addr_t'($urandom), data_t'($urandom), data_t'($urandom),
           $urandom % 4);
    for (int i = 0; i < NT; i++) chk(per_nature[i] > 10, "every nature used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
