// watchdog: 24-bit watchdog counter.
// Counts down by one on every prescaler tick while enabled. When it reaches
// zero it stops and asserts wdog, which stays high until software reloads
// the counter (load with load_val). Whether wdog resets the system is
// decided outside this block. Counting on the shared timer prescaler
// follows the document; holding at zero is this design's choice.
module watchdog #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         enable,
  input  logic         load,
  input  logic [W-1:0] load_val,
  output logic [W-1:0] count,
  output logic         wdog
);
  assign wdog = enable && (count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            count <= '1;
    else if (load)                         count <= load_val;
    else if (enable && tick && count != '0) count <= count - 1'b1;
  end
endmodule
