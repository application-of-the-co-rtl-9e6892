// mp_system: the heterogeneous multiprocessor platform, bus level.
//
// Standard processors (an 80486 and a TMS320C25 DSP), an ASIC, an FPGA and a
// shared memory hang on one shared bus; a communication controller arbitrates
// the bus and switches each transfer to the resource it addresses, adapting
// the signals where the resource speaks another protocol (here: a VME
// system reached through an ISA to VME adapter). The blocks are control
// state machines in the co-design FSM style: each reacts to input events
// after at least one clock and passes events through one-place buffers.
//
// Inside this top:
//   - two bim_master instances, the bus interface models of the 80486
//     (request line 0) and of the DSP (request line 1); the processors
//     themselves are outside and drive the cpu_* command ports;
//   - comm_ctrl: arbiter, bus switch, bus control unit, event buffers and
//     the VME adapter (communication nature 1);
//   - shared_mem: communication nature 0.
// Brought out as ports:
//   - x_*: request lines 2..N_REQ-1 (ASIC on line 2, FPGA on line 3, the
//     rest spare) with the same bus signals a bim_master drives; x index j
//     is request line j+2;
//   - t_*: interfaces for natures 2..N_TGT-1 (ASIC 2, FPGA 3, others
//     external); indices 0 and 1 of these arrays are served inside and
//     their t_* entries are unused;
//   - vme_*: the VME bus.
// An address's three LSBs choose the resource; the remaining bits are the
// resource's own address. The line and code assignment and the port layout
// are this design's choices; the composition follows the platform.
module mp_system
  import cfsm_pkg::*;
#(
  parameter int unsigned N_REQ     = 8,
  parameter int unsigned N_TGT     = 8,
  parameter int unsigned MEM_WORDS = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  arb_mode_e        arb_mode,
  // processor command ports: index 0 = 80486, 1 = DSP
  input  logic [1:0]       cpu_cmd_valid,
  input  logic [1:0]       cpu_cmd_rw,
  input  addr_t            cpu_cmd_addr  [2],
  input  data_t            cpu_cmd_wdata [2],
  output logic [1:0]       cpu_cmd_ready,
  output logic [1:0]       cpu_done,
  output data_t            cpu_rdata     [2],
  // further requesters on lines 2..N_REQ-1
  input  logic [N_REQ-3:0] x_breq,
  output logic [N_REQ-3:0] x_grant,
  input  addr_t            x_addr  [N_REQ-2],
  input  data_t            x_wdata [N_REQ-2],
  input  logic [N_REQ-3:0] x_rd_n,
  input  logic [N_REQ-3:0] x_wr_n,
  output logic             bus_ready,
  output data_t            bus_rdata,
  // further interfaces, natures 2..N_TGT-1
  output logic [N_TGT-1:0] t_req_present,
  output xfer_req_t        t_req_val   [N_TGT],
  input  logic [N_TGT-1:0] t_req_detect,
  input  logic [N_TGT-1:0] t_ack_emit,
  input  data_t            t_ack_val   [N_TGT],
  // VME bus
  output addr_t            vme_addr,
  output logic             vme_write_n,
  output logic             vme_as_n,
  output logic             vme_uds_n,
  output logic             vme_lds_n,
  input  logic             vme_dtack_n,
  input  data_t            vme_d_in,
  output data_t            vme_d_out,
  output logic             vme_d_oe,
  // observation
  output logic [N_REQ-1:0] grant,
  output logic             bus_busy,
  output logic [SEL_W-1:0] nature,
  output logic             vme_busy,
  output logic [N_TGT-1:0] ev_overwritten
);

  logic [N_REQ-1:0] m_breq, m_rd_n, m_wr_n;
  addr_t            m_addr  [N_REQ];
  data_t            m_wdata [N_REQ];

  // ---------------- processor bus interface models ----------------
  for (genvar c = 0; c < 2; c++) begin : g_bim
    bim_master u_bim (
      .clk, .rst_n,
      .cmd_valid(cpu_cmd_valid[c]), .cmd_rw(cpu_cmd_rw[c]),
      .cmd_addr(cpu_cmd_addr[c]), .cmd_wdata(cpu_cmd_wdata[c]),
      .cmd_ready(cpu_cmd_ready[c]), .done(cpu_done[c]), .done_rdata(cpu_rdata[c]),
      .breq(m_breq[c]), .grant(grant[c]),
      .addr(m_addr[c]), .wdata(m_wdata[c]), .rd_n(m_rd_n[c]), .wr_n(m_wr_n[c]),
      .ready(bus_ready), .rdata(bus_rdata)
    );
  end

  // ---------------- external requesters ----------------
  for (genvar j = 0; j < N_REQ - 2; j++) begin : g_ext
    assign m_breq[j+2]  = x_breq[j];
    assign m_addr[j+2]  = x_addr[j];
    assign m_wdata[j+2] = x_wdata[j];
    assign m_rd_n[j+2]  = x_rd_n[j];
    assign m_wr_n[j+2]  = x_wr_n[j];
  end
  assign x_grant = grant[N_REQ-1:2];

  // ---------------- interfaces: shared memory inside, rest outside ----------------
  logic [N_TGT-1:0] cc_req_present, cc_req_detect, cc_ack_emit;
  xfer_req_t        cc_req_val [N_TGT];
  data_t            cc_ack_val [N_TGT];
  logic             mem_detect, mem_ack;
  data_t            mem_ack_val;

  for (genvar k = 0; k < N_TGT; k++) begin : g_tgt
    if (k == int'(TGT_MEM)) begin : g_mem
      assign cc_req_detect[k] = mem_detect;
      assign cc_ack_emit[k]   = mem_ack;
      assign cc_ack_val[k]    = mem_ack_val;
      assign t_req_present[k] = 1'b0;
      assign t_req_val[k]     = '0;
    end else begin : g_out
      assign cc_req_detect[k] = t_req_detect[k];
      assign cc_ack_emit[k]   = t_ack_emit[k];
      assign cc_ack_val[k]    = t_ack_val[k];
      assign t_req_present[k] = cc_req_present[k];
      assign t_req_val[k]     = cc_req_val[k];
    end
  end

  shared_mem #(.MEM_WORDS(MEM_WORDS)) u_mem (
    .clk, .rst_n,
    .req_present(cc_req_present[TGT_MEM]), .req_val(cc_req_val[TGT_MEM]),
    .req_detect(mem_detect), .ack_emit(mem_ack), .ack_val(mem_ack_val)
  );

  // ---------------- communication controller ----------------
  comm_ctrl #(.N_REQ(N_REQ), .N_TGT(N_TGT)) u_cc (
    .clk, .rst_n, .arb_mode,
    .m_breq, .m_grant(grant), .m_addr, .m_wdata, .m_rd_n, .m_wr_n,
    .bus_ready, .bus_rdata,
    .t_req_present(cc_req_present), .t_req_val(cc_req_val),
    .t_req_detect(cc_req_detect), .t_ack_emit(cc_ack_emit), .t_ack_val(cc_ack_val),
    .vme_addr, .vme_write_n, .vme_as_n, .vme_uds_n, .vme_lds_n,
    .vme_dtack_n, .vme_d_in, .vme_d_out, .vme_d_oe,
    .bus_busy, .nature, .vme_busy, .ev_overwritten
  );

endmodule
