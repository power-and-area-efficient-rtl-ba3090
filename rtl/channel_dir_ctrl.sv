// channel_dir_ctrl: one end of the channel-direction-control (CDC) FSM pair
// of a bidirectional BiNoC channel.
//
// A bidirectional channel between two routers is driven by one end at a
// time. Each end runs this FSM; the two exchange a request and a release
// signal, and ownership of the channel moves between them like a token, so
// exactly one end owns it at any time. The end built with INIT_OWNER=1 owns
// it after reset (the high-priority end of the pair).
//
//   S_OUT      owns the channel: may drive flits (output direction)
//   S_IN_IDLE  does not own it and has nothing to send (input direction)
//   S_IN_WAIT  does not own it, has flits waiting, raises req_out
//
// The owner hands the channel over (rel_out pulses for one cycle, may_send
// is low in that cycle) when the other end requests it and either this end
// has nothing waiting or it has owned the channel for HOLD_MAX cycles; the
// cap keeps a busy end from starving the other. Virtual channels make a
// hand-over in the middle of a packet safe. The other end owns the channel
// from the next cycle. A router's last flit leaves one cycle after the
// release and the new owner's first flit appears two cycles after it takes
// over, so the two never drive the channel in the same cycle.
//
// The FSM pair and its role follow the described design; the states, the
// signals exchanged and the hold cap are this design's choices.
module channel_dir_ctrl #(
  parameter bit          INIT_OWNER = 1'b1,
  parameter int unsigned HOLD_MAX   = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic local_req,  // this router has flits waiting for the channel
  input  logic peer_req,   // the other end asks for the channel
  input  logic peer_rel,   // the other end hands the channel over
  output logic req_out,    // to the other end's peer_req
  output logic rel_out,    // to the other end's peer_rel
  output logic owner,      // channel in output direction at this end
  output logic may_send    // owner and not handing over this cycle
);
  typedef enum logic [1:0] {S_OUT, S_IN_IDLE, S_IN_WAIT} state_e;

  localparam int unsigned HW = $clog2(HOLD_MAX + 1);

  state_e        state, state_n;
  logic [HW-1:0] hold;

  assign owner   = (state == S_OUT);
  assign req_out = (state == S_IN_WAIT);
  assign rel_out = owner && peer_req && (!local_req || hold >= HW'(HOLD_MAX));
  assign may_send = owner && !rel_out;

  always_comb begin
    state_n = state;
    unique case (state)
      S_OUT:     if (rel_out)  state_n = local_req ? S_IN_WAIT : S_IN_IDLE;
      S_IN_IDLE: if (peer_rel) state_n = S_OUT;
                 else if (local_req) state_n = S_IN_WAIT;
      S_IN_WAIT: if (peer_rel) state_n = S_OUT;
                 else if (!local_req) state_n = S_IN_IDLE;
      default:   state_n = S_IN_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= INIT_OWNER ? S_OUT : S_IN_IDLE;
      hold  <= '0;
    end else begin
      state <= state_n;
      if (state != S_OUT)        hold <= '0;
      else if (hold != HW'(HOLD_MAX)) hold <= hold + 1'b1;
    end
  end

  // a release is only ever received by an end that does not own the channel
  assert property (@(posedge clk) disable iff (!rst_n) peer_rel |-> !owner);

endmodule
