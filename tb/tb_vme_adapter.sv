// tb_vme_adapter: self-checking test of the ISA to VME adapter against the
// behavioural VME slave. Each clock the adapter's VME outputs and its
// acknowledge are compared with a reference model of the state sequence
// Idle -> State1 -> State2 -> State3 (wait DTACK) -> State4 (wait DTACK
// release) -> Idle; read data is compared with a shadow copy of the slave's
// memory. DTACK delays are random, so the wait states in State3 and State4
// are exercised and the cycle count of every transfer is checked.
module tb_vme_adapter;
  import cfsm_pkg::*;
  logic      clk = 1'b0, rst_n = 1'b0;
  logic      req_present = 1'b0, req_detect;
  xfer_req_t req_val = '0;
  logic      ack_emit;
  data_t     ack_val;
  addr_t     vme_addr;
  logic      vme_write_n, vme_as_n, vme_uds_n, vme_lds_n, vme_dtack_n, vme_d_oe, busy;
  data_t     vme_d_in, vme_d_out;
  int        dtack_delay = 0, release_delay = 0, slave_errors, slave_cycles;
  int checks = 0, failures = 0;
  int n_rd = 0, n_wr = 0, n_wait3 = 0, n_wait4 = 0;

  vme_adapter dut (.*);

  vme_slave_model slave (
    .clk, .rst_n, .addr(vme_addr), .write_n(vme_write_n), .as_n(vme_as_n),
    .uds_n(vme_uds_n), .lds_n(vme_lds_n), .dtack_n(vme_dtack_n),
    .d_out(vme_d_in), .d_in(vme_d_out), .d_oe(vme_d_oe),
    .dtack_delay, .release_delay, .errors(slave_errors), .cycles(slave_cycles)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  data_t shadow [256];

  // One transfer; the reference model steps through the states by itself.
  task automatic xfer(input logic rw, input addr_t a, input data_t wd);
    int st, cyc;
    logic as_exp, done;
    @(negedge clk);
    req_present = 1'b1; req_val = '{rw: rw, addr: a, wdata: wd};
    #1 chk(req_detect, "request detected in Idle");
    @(posedge clk); #1;
    req_present = 1'b0;
    st = 1; cyc = 1; done = 1'b0;
    while (!done) begin
      // expected outputs in state st
      as_exp = (st == 2 || st == 3);
      chk(vme_as_n == !as_exp && vme_uds_n == !as_exp && vme_lds_n == !as_exp,
          "AS/UDS/LDS follow the state");
      chk(vme_addr == a && vme_write_n == rw, "address and R/W_bar driven from State1");
      chk(vme_d_oe == (!rw && st <= 3), "data driven for writes only, until State4");
      if (!rw && st <= 3) chk(vme_d_out == wd, "write data");
      chk(!ack_emit, "no acknowledge before the end");
      // next state as the reference sequence says
      case (st)
        1: st = 2;
        2: st = 3;
        3: if (!vme_dtack_n) st = 4; else n_wait3++;
        4: if (vme_dtack_n) st = 0; else n_wait4++;
        default: ;
      endcase
      @(posedge clk); #1; cyc++;
      if (st == 0) done = 1'b1;
      if (cyc > 100) done = 1'b1;
    end
    chk(ack_emit && vme_as_n && vme_write_n, "acknowledge on return to Idle");
    if (rw) chk(ack_val == shadow[a[10:3]], "read data from the slave");
    else shadow[a[10:3]] = wd;
    if (rw) n_rd++; else n_wr++;
    @(posedge clk); #1;
    chk(!ack_emit && !busy, "acknowledge is a pulse");
  endtask

  initial begin
    for (int i = 0; i < 256; i++) shadow[i] = data_t'((i * 16'h0101) ^ 16'h5A5A);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(vme_as_n && vme_uds_n && vme_lds_n && vme_write_n && !vme_d_oe && !busy,
        "bus idle after reset");
    xfer(1'b1, 24'h000039, 16'h0);        // read word 7
    xfer(1'b0, 24'h000039, 16'hC0DE);     // write it
    xfer(1'b1, 24'h000039, 16'h0);        // read back
    chk(ack_val == 16'hC0DE, "write then read back");
    for (int t = 0; t < 300; t++) begin
      dtack_delay   = $urandom % 4;
      release_delay = $urandom % 3;
      xfer(1'($urandom), {13'($urandom), 8'($urandom), 3'd1}, data_t'($urandom));
    end
    chk(slave_errors == 0, "no VME protocol errors seen by the slave");
    chk(slave_cycles == n_rd + n_wr, "one VME cycle per request");
    chk(n_wait3 > 0 && n_wait4 > 0, "DTACK wait states exercised");
    $display("reads %0d writes %0d waits in State3 %0d in State4 %0d",
             n_rd, n_wr, n_wait3, n_wait4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
