// pipe_delay: a chain of plain pipeline flip-flops.
//
// Delays a WIDTH-bit signal by STAGES cycles of the 50 MHz clock. The VGA
// pipeline uses it to carry the sync and blanking signals along with the
// colour data: hsync2 -> hsync3 -> hsync4, vsync2 -> vsync3 -> vsync4 and
// blank1 -> blank2 -> blank3, one register per pipeline stage.
//
// Interface: clk, rstn (asynchronous, active low; every stage resets to
// RESET_VALUE), d in, q out. Timing: q(t) = d(t - STAGES); no clock enable.
module pipe_delay #(
  parameter int unsigned       WIDTH       = 1,
  parameter int unsigned       STAGES      = 1,
  parameter logic [WIDTH-1:0]  RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rstn,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] stage [STAGES];

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      for (int i = 0; i < STAGES; i++) stage[i] <= RESET_VALUE;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < STAGES; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[STAGES-1];

endmodule
