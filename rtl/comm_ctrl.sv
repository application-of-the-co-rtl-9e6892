// comm_ctrl: the communication controller of the multiprocessor platform.
//
// Every sub-system that wants the shared bus asks this controller. It holds
// the three parts of the controller:
//   - bus_arbiter: grants the bus to one of N_REQ requesters according to
//     the configured priority option;
//   - a bus switch: connects the address, data and strobes of the granted
//     requester to the bus control unit (one-hot AND-OR multiplexer);
//   - bcu: decodes the communication nature from addr[2:0] and hands the
//     transfer to interface k = addr[2:0];
// and the interfaces themselves: the ISA to VME adapter sits inside as
// interface TGT_VME (1); every other interface (shared memory, ASIC, FPGA,
// further external resources) is reached through the t_* ports.
// Requests and acknowledges between the BCU and the interfaces are CFSM
// events, each held in a one-place cfsm_event buffer per interface and
// direction.
//
// Interface and timing
//   m_*      per requester: breq in, grant out (registered), addr/wdata/
//            rd_n/wr_n in; bus_ready (one-cycle pulse) and bus_rdata go to
//            all requesters and matter only to the one holding the grant.
//   t_*      per interface k: t_req_present[k]/t_req_val[k] is the pending
//            request, consumed by pulsing t_req_detect[k]; the interface
//            answers by pulsing t_ack_emit[k] with t_ack_val[k]. Index
//            TGT_VME of these ports is unused (outputs 0, inputs ignored).
//   vme_*    VME bus side of the adapter.
// With a bim_master and an interface that answers at once (the shared
// memory), a lone read takes 9 clocks from command to done: BReq 1, grant 1,
// State1 and the strobe 2, request event 2 (BCU register, buffer), memory 1,
// acknowledge event 1, READY 1. A VME read with no DTACK delay takes 14.
// Structure (arbiter + interfaces in the controller, BCU routing by the
// address LSBs) follows the platform description; the bus switch, the
// per-interface event buffers and the port layout are this design's.
module comm_ctrl
  import cfsm_pkg::*;
#(
  parameter int unsigned N_REQ = 8,
  parameter int unsigned N_TGT = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  arb_mode_e        arb_mode,
  // requesters
  input  logic [N_REQ-1:0] m_breq,
  output logic [N_REQ-1:0] m_grant,
  input  addr_t            m_addr  [N_REQ],
  input  data_t            m_wdata [N_REQ],
  input  logic [N_REQ-1:0] m_rd_n,
  input  logic [N_REQ-1:0] m_wr_n,
  output logic             bus_ready,
  output data_t            bus_rdata,
  // external interfaces
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
  output logic             bus_busy,
  output logic [SEL_W-1:0] nature,
  output logic             vme_busy,
  output logic [N_TGT-1:0] ev_overwritten
);

  // ---------------- arbitration ----------------
  bus_arbiter #(.N_REQ(N_REQ)) u_arb (
    .clk, .rst_n, .mode(arb_mode), .req(m_breq), .grant(m_grant), .busy(bus_busy)
  );

  // ---------------- bus switch ----------------
  addr_t sw_addr;
  data_t sw_wdata;
  logic  sw_rd_n, sw_wr_n;

  always_comb begin
    sw_addr  = '0;
    sw_wdata = '0;
    sw_rd_n  = 1'b1;
    sw_wr_n  = 1'b1;
    for (int i = 0; i < N_REQ; i++) begin
      if (m_grant[i]) begin
        sw_addr  |= m_addr[i];
        sw_wdata |= m_wdata[i];
        sw_rd_n  &= m_rd_n[i];
        sw_wr_n  &= m_wr_n[i];
      end
    end
  end

  // ---------------- bus control unit ----------------
  logic [N_TGT-1:0] req_emit, ack_present, ack_detect;
  xfer_req_t        req_val;
  data_t            ack_val [N_TGT];

  bcu #(.N_TGT(N_TGT)) u_bcu (
    .clk, .rst_n,
    .grant_any(bus_busy), .addr(sw_addr), .wdata(sw_wdata),
    .rd_n(sw_rd_n), .wr_n(sw_wr_n), .ready(bus_ready), .rdata(bus_rdata),
    .req_emit, .req_val, .ack_present, .ack_val, .ack_detect,
    .nature
  );

  // ---------------- event buffers per interface ----------------
  logic [N_TGT-1:0] rq_present, rq_detect, ak_emit, rq_ovw, ak_ovw;
  xfer_req_t        rq_val [N_TGT];
  data_t            ak_val [N_TGT];

  // VME adapter side
  logic      vme_req_detect, vme_ack_emit;
  data_t     vme_ack_val;

  for (genvar k = 0; k < N_TGT; k++) begin : g_tgt
    cfsm_event #(.VAL_W($bits(xfer_req_t))) u_req_ev (
      .clk, .rst_n, .emit(req_emit[k]), .emit_val(req_val),
      .detect(rq_detect[k]), .present(rq_present[k]), .val(rq_val[k]),
      .overwritten(rq_ovw[k])
    );
    cfsm_event #(.VAL_W(DATA_W)) u_ack_ev (
      .clk, .rst_n, .emit(ak_emit[k]), .emit_val(ak_val[k]),
      .detect(ack_detect[k]), .present(ack_present[k]), .val(ack_val[k]),
      .overwritten(ak_ovw[k])
    );
    if (k == int'(TGT_VME)) begin : g_vme
      assign rq_detect[k]     = vme_req_detect;
      assign ak_emit[k]       = vme_ack_emit;
      assign ak_val[k]        = vme_ack_val;
      assign t_req_present[k] = 1'b0;
      assign t_req_val[k]     = '0;
    end else begin : g_ext
      assign rq_detect[k]     = t_req_detect[k];
      assign ak_emit[k]       = t_ack_emit[k];
      assign ak_val[k]        = t_ack_val[k];
      assign t_req_present[k] = rq_present[k];
      assign t_req_val[k]     = rq_val[k];
    end
  end

  assign ev_overwritten = rq_ovw | ak_ovw;

  // ---------------- ISA to VME adapter ----------------
  vme_adapter u_vme (
    .clk, .rst_n,
    .req_present(rq_present[TGT_VME]), .req_val(rq_val[TGT_VME]),
    .req_detect(vme_req_detect),
    .ack_emit(vme_ack_emit), .ack_val(vme_ack_val),
    .vme_addr, .vme_write_n, .vme_as_n, .vme_uds_n, .vme_lds_n,
    .vme_dtack_n, .vme_d_in, .vme_d_out, .vme_d_oe,
    .busy(vme_busy)
  );

endmodule
