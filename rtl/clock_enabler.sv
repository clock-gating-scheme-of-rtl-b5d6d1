// clock_enabler: state machine that decides whether the producer actor gets
// its clock.
//
// It watches the FULL (f) and ALMOST-FULL (af) flags of the queue behind the
// actor. In state ON the enable is 1; as soon as either flag is seen the
// machine goes to OFF and drops the enable, so the gate stops the clock of the
// actor and of the queue ends it drives. In OFF it waits until both flags are
// low again (the consumer has made room) and goes back to ON. The enable is a
// registered Moore output, so it changes one clock after the flags; the
// almost-full level of the queue must leave room for the word the actor may
// still write in that cycle (the actor also obeys the queue's ready signal,
// so no word is lost either way).
//
// The two states and the rules F=0,AF=0 -> EN=1 and F=1,AF=1 -> EN=0 follow
// the published state diagram. Treating AF=1 with F=0 as "stop" and the
// registered output are this design's choices. It runs on the free-running
// clock. Reset is asynchronous, active low, and starts in ON.
module clock_enabler (
  input  logic clk,
  input  logic rst_n,
  input  logic f,
  input  logic af,
  output logic en
);

  typedef enum logic { ON = 1'b1, OFF = 1'b0 } state_t;
  state_t state, state_n;

  always_comb begin
    state_n = state;
    unique case (state)
      ON:  if (f || af)   state_n = OFF;
      OFF: if (!f && !af) state_n = ON;
      default:            state_n = ON;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ON;
    else        state <= state_n;
  end

  assign en = (state == ON);

endmodule
