// tb_comm_ctrl: self-checking test of the communication controller.
// Four bim_master instances on request lines 0..3 issue random reads and
// writes; natures 0 and 2..7 are answered by target models after random
// delays, nature 1 goes through the VME adapter to the behavioural VME
// slave. Each master works on its own words, so every read is compared with
// a shadow copy kept per master. The test runs under each priority option,
// checks the latency of a lone read (9 clocks from command to done with an
// interface that answers at once), and counts contended arbitrations, VME
// transfers and the use of every interface.
module tb_comm_ctrl;
  import cfsm_pkg::*;
  localparam int NR = 8, NT = 8, NM = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  arb_mode_e arb_mode = ARB_FIXED;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // ---------------- masters ----------------
  logic [NR-1:0] m_breq, m_grant, m_rd_n, m_wr_n;
  addr_t m_addr [NR];
  data_t m_wdata [NR];
  logic  bus_ready;
  data_t bus_rdata;
  logic [NM-1:0] cmd_valid = '0, cmd_rw = '0, cmd_ready, done;
  addr_t cmd_addr [NM];
  data_t cmd_wdata [NM];
  data_t done_rdata [NM];

  for (genvar m = 0; m < NM; m++) begin : g_m
    bim_master u_bim (
      .clk, .rst_n, .cmd_valid(cmd_valid[m]), .cmd_rw(cmd_rw[m]),
      .cmd_addr(cmd_addr[m]), .cmd_wdata(cmd_wdata[m]), .cmd_ready(cmd_ready[m]),
      .done(done[m]), .done_rdata(done_rdata[m]),
      .breq(m_breq[m]), .grant(m_grant[m]), .addr(m_addr[m]), .wdata(m_wdata[m]),
      .rd_n(m_rd_n[m]), .wr_n(m_wr_n[m]), .ready(bus_ready), .rdata(bus_rdata)
    );
  end
  for (genvar m = NM; m < NR; m++) begin : g_idle
    assign m_breq[m] = 1'b0; assign m_addr[m] = '0; assign m_wdata[m] = '0;
    assign m_rd_n[m] = 1'b1; assign m_wr_n[m] = 1'b1;
  end

  // ---------------- interfaces ----------------
  logic [NT-1:0] t_req_present, t_req_detect, t_ack_emit;
  xfer_req_t     t_req_val [NT];
  data_t         t_ack_val [NT];
  int            t_delay = 0;
  int            served [NT];

  for (genvar k = 0; k < NT; k++) begin : g_t
    if (k == 1) begin : g_none
      assign t_req_detect[k] = 1'b0; assign t_ack_emit[k] = 1'b0;
      assign t_ack_val[k] = '0; assign served[k] = 0;
    end else begin : g_model
      target_model #(.TAG(16'(k * 16'h1111))) u_t (
        .clk, .rst_n, .req_present(t_req_present[k]), .req_val(t_req_val[k]),
        .req_detect(t_req_detect[k]), .ack_emit(t_ack_emit[k]), .ack_val(t_ack_val[k]),
        .delay(t_delay), .served(served[k])
      );
    end
  end

  addr_t vme_addr;
  logic  vme_write_n, vme_as_n, vme_uds_n, vme_lds_n, vme_dtack_n, vme_d_oe;
  data_t vme_d_in, vme_d_out;
  int    dtack_delay = 0, release_delay = 0, vme_errors, vme_cycles;
  logic  bus_busy, vme_busy;
  logic [SEL_W-1:0] nature;
  logic [NT-1:0] ev_overwritten;

  vme_slave_model u_vme (
    .clk, .rst_n, .addr(vme_addr), .write_n(vme_write_n), .as_n(vme_as_n),
    .uds_n(vme_uds_n), .lds_n(vme_lds_n), .dtack_n(vme_dtack_n),
    .d_out(vme_d_in), .d_in(vme_d_out), .d_oe(vme_d_oe),
    .dtack_delay, .release_delay, .errors(vme_errors), .cycles(vme_cycles)
  );

  comm_ctrl #(.N_REQ(NR), .N_TGT(NT)) dut (.*);

  // ---------------- monitors ----------------
  int contended = 0, n_ovw = 0;
  always @(posedge clk) if (rst_n) begin
    if (!(|(m_grant & m_breq)) && $countones(m_breq) > 1) contended++;
    if (|ev_overwritten) n_ovw++;
  end

  // ---------------- shadow memories and traffic ----------------
  data_t shadow [NM][NT][64];

  function automatic data_t init_word(int k, int idx);
    if (k == 1) return data_t'((idx * 16'h0101) ^ 16'h5A5A);
    return data_t'((idx * 16'h0107) ^ (k * 16'h1111));
  endfunction

  task automatic run(input int m, input logic rw, input int k, input int w,
                     input data_t wd, output int lat);
    int idx;
    idx = m * 64 + w;                       // addr[10:3] = index
    @(negedge clk);
    while (!cmd_ready[m]) @(negedge clk);
    cmd_valid[m] = 1'b1; cmd_rw[m] = rw;
    cmd_addr[m] = addr_t'({13'($urandom), 8'(idx), 3'(k)});
    cmd_wdata[m] = wd;
    @(posedge clk); #1;
    cmd_valid[m] = 1'b0;
    lat = 0;
    while (!done[m]) begin @(posedge clk); #1; lat++; end
    if (rw) chk(done_rdata[m] == shadow[m][k][w], "read data matches");
    else shadow[m][k][w] = wd;
  endtask

  task automatic traffic(input int m, input int n);
    int lat;
    for (int t = 0; t < n; t++)
      run(m, 1'($urandom), $urandom % NT, $urandom % 64, data_t'($urandom), lat);
  endtask

  initial begin
    int lat;
    for (int m = 0; m < NM; m++)
      for (int k = 0; k < NT; k++)
        for (int w = 0; w < 64; w++) shadow[m][k][w] = init_word(k, m * 64 + w);
    for (int m = 0; m < NM; m++) begin cmd_addr[m] = '0; cmd_wdata[m] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // lone read, interface answering at once
    run(0, 1'b1, 0, 5, 16'h0, lat);
    chk(lat == 9, "lone read latency 9 clocks");
    $display("lone read latency %0d", lat);
    run(2, 1'b1, 1, 6, 16'h0, lat);
    $display("lone VME read latency %0d", lat);

    for (int mi = 0; mi < 3; mi++) begin
      arb_mode = arb_mode_e'(mi);
      t_delay = mi;
      dtack_delay = mi;
      release_delay = 2 - mi;
      fork
        traffic(0, 60);
        traffic(1, 60);
        traffic(2, 60);
        traffic(3, 60);
      join
    end
    chk(contended > 20, "contended arbitrations happened");
    for (int k = 0; k < NT; k++)
      if (k != 1) chk(served[k] > 10, "interface used");
    chk(vme_cycles > 10 && vme_errors == 0, "VME transfers without protocol errors");
    chk(n_ovw == 0, "no event overwritten (one transfer outstanding)");
    $display("contended %0d vme %0d", contended, vme_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
