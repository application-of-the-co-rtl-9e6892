// bcu: Bus Control Unit of the communication controller.
//
// Once the arbiter has granted the bus, the BCU works out the "communication
// nature" of the transfer from the three least significant address bits and
// asks the matching interface to carry it out; it then waits for that
// interface's acknowledge, latches the returned data and answers the bus
// master with READY. Its states are those of the control-unit CFSM:
//   Idle          -> on a grant                                  -> CommuNature
//   CommuNature   -> reads addr[2:0] once the master's RD_bar or W_bar
//                    is low, emits Req.Intrf to that interface    -> WaitOnData
//   WaitOnData    -> stays while the acknowledge is absent; on it
//                    latches the data (Latch-com), raises READY   -> Idle
// Waiting for the strobe before reading the address, returning to Idle when
// the grant disappears, and ignoring the strobe while READY is still high
// (the master needs that cycle to release it) are this design's choices.
//
// Interface and timing
//   bus side: grant_any (bus owned), addr/wdata/rd_n/wr_n of the owner,
//             ready (one-cycle pulse) and rdata (held) back to it.
//   interface side: req_emit[k] pulses for one cycle with req_val, the
//             transfer for interface k; ack_present[k]/ack_val[k] is the
//             acknowledge event of interface k, consumed by ack_detect[k].
// Overhead per transfer: 1 clock from strobe to request event, 1 clock from
// acknowledge to READY, on top of the interface's own time.
module bcu
  import cfsm_pkg::*;
#(
  parameter int unsigned N_TGT = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // bus side
  input  logic             grant_any,
  input  addr_t            addr,
  input  data_t            wdata,
  input  logic             rd_n,
  input  logic             wr_n,
  output logic             ready,
  output data_t            rdata,
  // interface side
  output logic [N_TGT-1:0] req_emit,
  output xfer_req_t        req_val,
  input  logic [N_TGT-1:0] ack_present,
  input  data_t            ack_val [N_TGT],
  output logic [N_TGT-1:0] ack_detect,
  // observation
  output logic [SEL_W-1:0] nature
);

  typedef enum logic [1:0] {S_IDLE, S_COMMU_NATURE, S_WAIT_DATA} state_e;
  state_e state;
  logic   strobe;
  logic   sel_ok;

  assign strobe = !rd_n || !wr_n;
  // Codes with no interface behind them (N_TGT < 8) are not decoded.
  assign sel_ok = (32'(addr[SEL_W-1:0]) < N_TGT);

  always_comb begin
    ack_detect = '0;
    if (state == S_WAIT_DATA && ack_present[nature])
      ack_detect[nature] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      nature   <= '0;
      req_emit <= '0;
      req_val  <= '0;
      ready    <= 1'b0;
      rdata    <= '0;
    end else begin
      req_emit <= '0;
      ready    <= 1'b0;
      unique case (state)
        S_IDLE: if (grant_any && !ready) state <= S_COMMU_NATURE;
        S_COMMU_NATURE: begin
          if (!grant_any) begin
            state <= S_IDLE;
          end else if (strobe && sel_ok) begin    // read 3 LSB address
            nature             <= addr[SEL_W-1:0];
            req_emit[addr[SEL_W-1:0]] <= 1'b1;    // Req.Intrf
            req_val.rw         <= !rd_n;
            req_val.addr       <= addr;
            req_val.wdata      <= wdata;
            state              <= S_WAIT_DATA;
          end
        end
        S_WAIT_DATA: if (ack_present[nature]) begin
          rdata <= ack_val[nature];               // Latch-com
          ready <= 1'b1;                          // READY
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_one_request : assert property (@(posedge clk) disable iff (!rst_n)
                                   $onehot0(req_emit));

endmodule
