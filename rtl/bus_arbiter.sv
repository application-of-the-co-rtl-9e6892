// bus_arbiter: bus arbitration part of the communication controller.
//
// Requesters ask for the shared bus on N_REQ request lines (eight in the
// platform); each line has its own grant line. When the bus is idle and
// requests are pending, the arbiter grants one of them; the grant then holds
// for as long as that requester keeps its request line high (no
// pre-emption). When the owner drops its request, the bus is re-arbitrated
// in the same clock among the requests still pending.
//
// The priority option is chosen by `mode`:
//   ARB_FIXED        the highest-numbered pending request level wins;
//   ARB_ROUND_ROBIN  the search starts at the line after the last grant;
//   ARB_DAISY_CHAIN  the grant enters the chain at line 0 and is passed up
//                    the chain by every line that is not requesting.
// Eight lines, one grant per line and the three priority options come from
// the platform description; which end of the chain or level order has
// priority, and holding the grant until the request drops, are this design's
// choices. The grant is a register: it appears one clock after the request
// (the reaction delay of a hardware CFSM), and is one-hot or zero.
module bus_arbiter
  import cfsm_pkg::*;
#(
  parameter int unsigned N_REQ = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  arb_mode_e        mode,
  input  logic [N_REQ-1:0] req,
  output logic [N_REQ-1:0] grant,
  output logic             busy
);

  localparam int unsigned IW = (N_REQ > 1) ? $clog2(N_REQ) : 1;

  logic [IW-1:0]    last_q;      // index of the most recent grant
  logic [N_REQ-1:0] win_fixed, win_rr, win_daisy, win;
  logic [N_REQ:0]   chain_in;    // daisy-chain grant ripple
  logic             owner_keeps;

  // Fixed priority: highest pending level.
  always_comb begin
    win_fixed = '0;
    for (int i = 0; i < N_REQ; i++)
      if (req[i]) win_fixed = N_REQ'(1) << i;
  end

  // Round robin: first pending line after last_q, wrapping around.
  always_comb begin
    logic found;
    int unsigned idx;
    win_rr = '0;
    found  = 1'b0;
    for (int unsigned k = 1; k <= N_REQ; k++) begin
      idx = (32'(last_q) + k) % N_REQ;
      if (!found && req[idx]) begin
        win_rr    = N_REQ'(1) << idx;
        found     = 1'b1;
      end
    end
  end

  // Daisy chain: the grant ripples from line 0 through idle lines.
  assign chain_in[0] = 1'b1;
  for (genvar i = 0; i < N_REQ; i++) begin : g_chain
    assign win_daisy[i]  = chain_in[i] & req[i];
    assign chain_in[i+1] = chain_in[i] & ~req[i];
  end

  always_comb begin
    unique case (mode)
      ARB_ROUND_ROBIN: win = win_rr;
      ARB_DAISY_CHAIN: win = win_daisy;
      default:         win = win_fixed;
    endcase
  end

  assign owner_keeps = |(grant & req);
  assign busy        = |grant;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant  <= '0;
      last_q <= IW'(N_REQ - 1);
    end else if (!owner_keeps) begin
      grant <= win;
      for (int i = 0; i < N_REQ; i++)
        if (win[i]) last_q <= IW'(i);
    end
  end

  // A grant is never given to more than one requester.
  a_onehot_grant : assert property (@(posedge clk) disable iff (!rst_n)
                                    $onehot0(grant));

endmodule
