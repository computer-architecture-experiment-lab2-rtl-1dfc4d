// anti_jitter: push-button debouncer. The raw button is synchronised into
// the clock domain by two flip-flops; the clean output takes the new level
// only after the synchronised input has differed from it for CYCLES
// consecutive clocks, so contact bounce shorter than that is ignored. The
// output changes CYCLES + 2 clocks after a stable level change of the input.
// There is no reset: whatever the power-up state, the output follows the
// input once it has been stable for CYCLES clocks.
// The default, 500000 cycles, is 10 ms of a 50 MHz board clock; the
// document names the debouncer but gives no figure.
module anti_jitter #(
  parameter int unsigned CYCLES = 500_000
) (
  input  logic clk,
  input  logic btn_in,
  output logic btn_out
);
  localparam int CW = $clog2(CYCLES + 1);

  logic [1:0]    sync;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    sync <= {sync[0], btn_in};
    if (sync[1] == btn_out) begin
      count <= '0;
    end else if (count >= CW'(CYCLES - 1)) begin
      count   <= '0;
      btn_out <= sync[1];
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule
