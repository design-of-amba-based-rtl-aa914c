// Controller of the AHB-to-APB bridge.
//
// A Moore machine that stretches each accepted AHB transfer with HREADYOUT
// low while it runs one APB transfer:
//
//   read : accept -> SETUP -> ACCESS (until ack) -> DONE
//   write: accept -> WDATA -> SETUP -> ACCESS (until ack) -> DONE
//
// WDATA exists because HWDATA is only valid in the AHB data phase, one cycle
// after the address is accepted, while APB wants its write data in the
// setup phase; `wdata_load` captures it there. In SETUP the select is high
// and the enable low; in ACCESS both are high and the machine waits for the
// peripheral's acknowledge, so a slow peripheral adds AHB wait states one
// for one. In DONE (and IDLE, ERR2) HREADYOUT is high and the AHB master may
// already present the next address, which is accepted directly, so a stream
// of zero-wait reads costs 3 cycles each and writes 4.
//
// When the peripheral acknowledges with its error flag set the machine gives
// the AHB two-cycle response: ERR1 with HREADYOUT low, ERR2 with it high,
// HRESP = RETRY when `retry_enable` is set and ERROR otherwise.
//
// The controller's job (HREADYOUT handling and generating the APB signals)
// follows the bridge description; the states, the write-data cycle and the
// error handling are this design's own.
module bridge_fsm
  import ahb2apb_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          accept,
  input  logic          accept_write,
  input  logic          apb_ack,
  input  logic          apb_err,
  input  logic          retry_enable,
  output logic          ready,
  output logic [1:0]    resp,
  output logic          wdata_load,
  output logic          rdata_load,
  output logic          apb_sel,
  output logic          apb_enable
);

  bridge_state_e state_q, state_d;
  logic          is_write_q;     // direction of the transfer in flight
  logic          retry_q;        // kind of error response in progress

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE, ST_DONE, ST_ERR2:
        if (accept) state_d = accept_write ? ST_WDATA : ST_SETUP;
        else        state_d = ST_IDLE;
      ST_WDATA:  state_d = ST_SETUP;
      ST_SETUP:  state_d = ST_ACCESS;
      ST_ACCESS: if (apb_ack) state_d = apb_err ? ST_ERR1 : ST_DONE;
      ST_ERR1:   state_d = ST_ERR2;
      default:   state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ST_IDLE;
      is_write_q <= 1'b0;
      retry_q    <= 1'b0;
    end else begin
      state_q <= state_d;
      if (accept) is_write_q <= accept_write;
      if (state_q == ST_ACCESS && apb_ack && apb_err) retry_q <= retry_enable;
    end
  end

  always_comb begin
    ready      = (state_q == ST_IDLE) || (state_q == ST_DONE) || (state_q == ST_ERR2);
    resp       = HRESP_OKAY;
    if (state_q == ST_ERR1 || state_q == ST_ERR2)
      resp = retry_q ? HRESP_RETRY : HRESP_ERROR;
  end

  assign apb_sel    = (state_q == ST_SETUP) || (state_q == ST_ACCESS);
  assign apb_enable = (state_q == ST_ACCESS);
  assign wdata_load = (state_q == ST_WDATA);
  assign rdata_load = (state_q == ST_ACCESS) && apb_ack && !is_write_q;


  // A transfer can only be accepted while HREADYOUT is high.
  a_accept_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> ready);
  // APB: every setup phase is followed by an access phase.
  a_setup_then_access: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_SETUP) |=> (state_q == ST_ACCESS));
  // AHB: an error response is two cycles, the first with HREADYOUT low.
  a_two_cycle_error: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_ERR1) |-> !ready ##1 (ready && resp != HRESP_OKAY));

endmodule
