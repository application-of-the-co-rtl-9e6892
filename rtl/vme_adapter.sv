// vme_adapter: ISA to VME interface adapter of the communication controller.
//
// It turns one transfer request from the bus control unit into a VME data
// transfer cycle with 16-bit data (D0-D15) and acknowledges it once the VME
// slave has answered. Its states follow the VME-signal CFSM:
//   Idle    -> waits for the interface request (Req.Intrf)          -> State1
//   State1  -> drives the system address onto the VME address lines
//              and sets R/W_bar (1 = read, 0 = write)               -> State2
//   State2  -> asserts AS_bar, UDS_bar and LDS_bar (low)             -> State3
//   State3  -> waits while DTACK_bar is high; when it goes low       -> State4
//   State4  -> data latched, UDS_bar/LDS_bar/AS_bar negated; waits
//              for DTACK_bar to return high, then acknowledges        -> Idle
// Both data strobes are used together: every transfer is one 16-bit word.
// Writes (data driven on D0-D15 from State1 until State4) and the moment of
// the acknowledge (on the way back to Idle) are this design's choices; the
// reference sequence describes the read cycle. The data bus is split into
// d_in, d_out and d_oe instead of a tri-state port.
//
// Interface and timing
//   req_present/req_val/req_detect: request event from the bus control unit.
//   ack_emit/ack_val: one-cycle acknowledge event with the read data.
//   All VME outputs are registered. The address leads AS_bar by one clock.
//   A cycle takes 4 clocks plus the slave's DTACK_bar delays.
module vme_adapter
  import cfsm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // request/acknowledge events
  input  logic      req_present,
  input  xfer_req_t req_val,
  output logic      req_detect,
  output logic      ack_emit,
  output data_t     ack_val,
  // VME bus
  output addr_t     vme_addr,
  output logic      vme_write_n,   // R/W_bar
  output logic      vme_as_n,
  output logic      vme_uds_n,
  output logic      vme_lds_n,
  input  logic      vme_dtack_n,
  input  data_t     vme_d_in,
  output data_t     vme_d_out,
  output logic      vme_d_oe,
  // observation
  output logic      busy
);

  typedef enum logic [2:0] {S_IDLE, S_STATE1, S_STATE2, S_STATE3, S_STATE4} state_e;
  state_e state;

  assign req_detect = (state == S_IDLE) && req_present;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      vme_addr    <= '0;
      vme_write_n <= 1'b1;
      vme_as_n    <= 1'b1;
      vme_uds_n   <= 1'b1;
      vme_lds_n   <= 1'b1;
      vme_d_out   <= '0;
      vme_d_oe    <= 1'b0;
      ack_emit    <= 1'b0;
      ack_val     <= '0;
    end else begin
      ack_emit <= 1'b0;
      unique case (state)
        S_IDLE: if (req_present) begin         // REQINTRF
          vme_addr    <= req_val.addr;         // Addr_VME <= Addr_ISA
          vme_write_n <= req_val.rw;
          vme_d_out   <= req_val.wdata;
          vme_d_oe    <= !req_val.rw;
          state       <= S_STATE1;
        end
        S_STATE1: begin
          vme_as_n  <= 1'b0;
          vme_uds_n <= 1'b0;
          vme_lds_n <= 1'b0;
          state     <= S_STATE2;
        end
        S_STATE2: state <= S_STATE3;
        S_STATE3: if (!vme_dtack_n) begin      // DTACK
          if (vme_write_n) ack_val <= vme_d_in; // VME-DATA latched
          vme_as_n  <= 1'b1;
          vme_uds_n <= 1'b1;
          vme_lds_n <= 1'b1;
          vme_d_oe  <= 1'b0;
          state     <= S_STATE4;
        end
        S_STATE4: if (vme_dtack_n) begin       // DTACK negated
          vme_write_n <= 1'b1;
          ack_emit    <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Data strobes are only driven inside an address-strobe window.
  a_ds_in_as : assert property (@(posedge clk) disable iff (!rst_n)
                                (!vme_uds_n || !vme_lds_n) |-> !vme_as_n);

endmodule
