// ombc: Outstanding Message Buffer Counter, the hardware half of the
// message throttling scheme.
//
// System software reserves a memory segment for messages that bounce back
// to this node and loads the counter with the number of maximum-size
// messages that fit there (set_*). Every throttled (user) message that is
// injected decrements the counter (hw_dec). System software increments it
// when an Acknowledge comes back and may also decrement it, both as atomic
// operations (sw_inc, sw_dec). While the counter is zero, zero is high and
// user SENDs are held at issue. zero_event pulses for one cycle when the
// counter reaches zero, so that the system can swap out stalled threads or
// enlarge the bounce buffer.
//
// Several requests in one cycle add up (+1 for sw_inc, -1 for each of hw_dec
// and sw_dec); the counter saturates at zero and at its maximum. The
// counter width and the reset value (zero: no user messages until software
// loads the counter) are this design's choice.
module ombc #(
  parameter int unsigned W         = 16,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         set_en,
  input  logic [W-1:0] set_val,
  input  logic         sw_inc,
  input  logic         sw_dec,
  input  logic         hw_dec,
  output logic [W-1:0] count,
  output logic         zero,
  output logic         zero_event
);

  logic [W+1:0] sum;
  logic [W-1:0] next;

  always_comb begin
    sum = {2'b00, count} + (W+2)'(sw_inc) - (W+2)'(sw_dec) - (W+2)'(hw_dec);
    if (set_en)
      next = set_val;
    else if (sum[W+1])                 // went below zero
      next = '0;
    else if (sum[W])                   // above the maximum
      next = '1;
    else
      next = sum[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count      <= RESET_VAL;
      zero_event <= 1'b0;
    end else begin
      count      <= next;
      zero_event <= (next == '0) && (count != '0);
    end
  end

  assign zero = (count == '0);

endmodule
