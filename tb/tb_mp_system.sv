// tb_mp_system: end-to-end test of the multiprocessor platform at its
// default size (8 request lines, 8 interfaces, 1024-word shared memory).
//
// The 80486 and the DSP drive the processor command ports; the ASIC, the
// FPGA and the four spare requesters are played by bim_master instances on
// request lines 2..7. Interfaces 2..7 are answered by target models after
// random delays, interface 1 is a behavioural VME slave with random DTACK
// delays, interface 0 is the built-in shared memory. Every requester works
// on its own words, so every read is compared with that requester's shadow
// copy. The traffic runs under each priority option and includes the
// transfers named for the platform: the processor talking to the ASIC, the
// ASIC to the FPGA, the FPGA to the shared memory, the processor reading the
// VME system. Each mechanism is counted and must have happened: contention
// for the bus, every priority option, shared-memory reads and writes, VME
// reads and writes, DTACK wait states in State3 and State4, and every
// external interface. The one-place event buffers are never overwritten in
// this system (the bus control unit keeps one transfer outstanding), which
// is checked too.
module tb_mp_system;
  import cfsm_pkg::*;
  localparam int NR = 8, NT = 8, WPM = 32;   // words per requester and interface
  logic clk = 1'b0, rst_n = 1'b0;
  arb_mode_e arb_mode = ARB_FIXED;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // ---------------- command ports of all eight requesters ----------------
  logic [NR-1:0] cmd_valid = '0, cmd_rw = '0, cmd_ready, done;
  addr_t cmd_addr [NR];
  data_t cmd_wdata [NR];
  data_t done_rdata [NR];

  // external requesters (lines 2..7) are bim_master instances here
  logic [NR-3:0] x_breq, x_grant, x_rd_n, x_wr_n;
  addr_t x_addr [NR-2];
  data_t x_wdata [NR-2];
  logic  bus_ready;
  data_t bus_rdata;

  for (genvar j = 0; j < NR - 2; j++) begin : g_x
    bim_master u_bim (
      .clk, .rst_n, .cmd_valid(cmd_valid[j+2]), .cmd_rw(cmd_rw[j+2]),
      .cmd_addr(cmd_addr[j+2]), .cmd_wdata(cmd_wdata[j+2]), .cmd_ready(cmd_ready[j+2]),
      .done(done[j+2]), .done_rdata(done_rdata[j+2]),
      .breq(x_breq[j]), .grant(x_grant[j]), .addr(x_addr[j]), .wdata(x_wdata[j]),
      .rd_n(x_rd_n[j]), .wr_n(x_wr_n[j]), .ready(bus_ready), .rdata(bus_rdata)
    );
  end

  // ---------------- interfaces ----------------
  logic [NT-1:0] t_req_present, t_req_detect, t_ack_emit;
  xfer_req_t     t_req_val [NT];
  data_t         t_ack_val [NT];
  int            t_delay = 0;
  int            served [NT];

  for (genvar k = 0; k < NT; k++) begin : g_t
    if (k < 2) begin : g_inside
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
  logic [NR-1:0] grant;
  logic  bus_busy, vme_busy;
  logic [SEL_W-1:0] nature;
  logic [NT-1:0] ev_overwritten;

  vme_slave_model u_vme (
    .clk, .rst_n, .addr(vme_addr), .write_n(vme_write_n), .as_n(vme_as_n),
    .uds_n(vme_uds_n), .lds_n(vme_lds_n), .dtack_n(vme_dtack_n),
    .d_out(vme_d_in), .d_in(vme_d_out), .d_oe(vme_d_oe),
    .dtack_delay, .release_delay, .errors(vme_errors), .cycles(vme_cycles)
  );

  mp_system dut (
    .clk, .rst_n, .arb_mode,
    .cpu_cmd_valid(cmd_valid[1:0]), .cpu_cmd_rw(cmd_rw[1:0]),
    .cpu_cmd_addr(cmd_addr[0:1]), .cpu_cmd_wdata(cmd_wdata[0:1]),
    .cpu_cmd_ready(cmd_ready[1:0]), .cpu_done(done[1:0]), .cpu_rdata(done_rdata[0:1]),
    .x_breq, .x_grant, .x_addr, .x_wdata, .x_rd_n, .x_wr_n, .bus_ready, .bus_rdata,
    .t_req_present, .t_req_val, .t_req_detect, .t_ack_emit, .t_ack_val,
    .vme_addr, .vme_write_n, .vme_as_n, .vme_uds_n, .vme_lds_n,
    .vme_dtack_n, .vme_d_in, .vme_d_out, .vme_d_oe,
    .grant, .bus_busy, .nature, .vme_busy, .ev_overwritten
  );

  // ---------------- mechanism counters ----------------
  logic [NR-1:0] breq_all;
  assign breq_all = {x_breq, ~cmd_ready[1:0]};   // a processor's BReq is up whenever its BIM is not idle
  int contended [3], n_ovw = 0, wait3 = 0, wait4 = 0;
  int mem_rd = 0, mem_wr = 0, vme_rd = 0, vme_wr = 0;
  int pair [NR][NT];

  always @(posedge clk) if (rst_n) begin
    if (!(|(grant & breq_all)) && $countones(breq_all) > 1) contended[int'(arb_mode)]++;
    if (|ev_overwritten) n_ovw++;
    if (vme_busy && !vme_as_n && vme_dtack_n) wait3++;
    if (vme_busy && vme_as_n && !vme_dtack_n) wait4++;
  end

  // ---------------- traffic ----------------
  data_t shadow [NR][NT][WPM];
  logic  known  [NR][NT][WPM];

  task automatic run(input int m, input logic rw_in, input int k, input int w,
                     input data_t wd, output int lat);
    int idx;
    logic rw;
    rw  = rw_in && known[m][k][w];          // unwritten memory words are written first
    idx = m * WPM + w;                      // addr[10:3] = word index
    @(negedge clk);
    while (!cmd_ready[m]) @(negedge clk);
    cmd_valid[m] = 1'b1; cmd_rw[m] = rw;
    cmd_addr[m] = addr_t'({11'($urandom), 2'b00, 8'(idx), 3'(k)});  // bits 12:11 zero: shared-memory word index
    cmd_wdata[m] = wd;
    @(posedge clk); #1;
    cmd_valid[m] = 1'b0;
    lat = 0;
    while (!done[m]) begin @(posedge clk); #1; lat++; end
    if (rw) chk(done_rdata[m] == shadow[m][k][w], "read data matches");
    else begin shadow[m][k][w] = wd; known[m][k][w] = 1'b1; end
    pair[m][k]++;
    if (k == 0) begin if (rw) mem_rd++; else mem_wr++; end
    if (k == 1) begin if (rw) vme_rd++; else vme_wr++; end
  endtask

  task automatic traffic(input int m, input int n);
    int lat;
    for (int t = 0; t < n; t++)
      run(m, 1'($urandom), $urandom % NT, $urandom % WPM, data_t'($urandom), lat);
  endtask

  initial begin
    int lat;
    for (int m = 0; m < NR; m++) begin
      cmd_addr[m] = '0; cmd_wdata[m] = '0;
      for (int k = 0; k < NT; k++) begin
        pair[m][k] = 0;
        for (int w = 0; w < WPM; w++) begin
          known[m][k][w] = (k != 0);
          if (k == 1) shadow[m][k][w] = data_t'(((m * WPM + w) * 16'h0101) ^ 16'h5A5A);
          else        shadow[m][k][w] = data_t'(((m * WPM + w) * 16'h0107) ^ (k * 16'h1111));
        end
      end
    end
    for (int i = 0; i < 3; i++) contended[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // one complete operation on each path, alone on the bus
    run(0, 1'b0, 0, 1, 16'h486A, lat);       // 80486 writes the shared memory
    chk(lat == 9, "lone memory write: 9 clocks");
    run(1, 1'b1, 0, 1, 16'h0, lat);          // DSP reads its own word
    run(0, 1'b1, 1, 2, 16'h0, lat);          // 80486 reads the VME system
    chk(lat == 14, "lone VME read, no DTACK delay: 14 clocks");
    run(0, 1'b0, 2, 3, 16'hA51C, lat);       // 80486 to the ASIC
    run(2, 1'b0, 3, 4, 16'hF06A, lat);       // ASIC to the FPGA
    run(3, 1'b0, 0, 5, 16'h0F0F, lat);       // FPGA to the shared memory
    run(3, 1'b1, 0, 5, 16'h0, lat);

    for (int mi = 0; mi < 3; mi++) begin
      arb_mode      = arb_mode_e'(mi);
      t_delay       = mi;
      dtack_delay   = 1 + mi;
      release_delay = 2 - mi;
      fork
        traffic(0, 40); traffic(1, 40); traffic(2, 40); traffic(3, 40);
        traffic(4, 40); traffic(5, 40); traffic(6, 40); traffic(7, 40);
      join
    end

    for (int i = 0; i < 3; i++) chk(contended[i] > 20, "contention under each priority option");
    chk(mem_rd > 10 && mem_wr > 10, "shared memory read and written");
    chk(vme_rd > 10 && vme_wr > 10, "VME reads and writes");
    chk(vme_cycles == vme_rd + vme_wr && vme_errors == 0, "VME protocol kept");
    chk(wait3 > 0 && wait4 > 0, "DTACK wait states in State3 and State4");
    for (int k = 2; k < NT; k++) chk(served[k] > 10, "external interface used");
    chk(pair[0][2] > 0 && pair[2][3] > 0 && pair[3][0] > 0 && pair[0][1] > 0,
        "processor-ASIC, ASIC-FPGA, FPGA-memory and processor-VME transfers");
    chk(n_ovw == 0, "no event overwritten");
    $display("contended fixed %0d rr %0d daisy %0d; mem r/w %0d/%0d; vme r/w %0d/%0d; waits %0d/%0d",
             contended[0], contended[1], contended[2], mem_rd, mem_wr, vme_rd, vme_wr, wait3, wait4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
