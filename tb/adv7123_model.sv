// adv7123_model: behavioural model of the input register stage of the
// ADV7123 video DAC. On each rising edge of the pixel clock it captures the
// three 8-bit colour inputs and the active-low blank input. The analogue
// conversion is not modelled: the registered digital values stand for the
// colour reaching the screen.
module adv7123_model (
  input  logic       vga_clk,
  input  logic [7:0] r_in,
  input  logic [7:0] g_in,
  input  logic [7:0] b_in,
  input  logic       blank_n_in,
  output logic [7:0] r,
  output logic [7:0] g,
  output logic [7:0] b,
  output logic       blank_n
);

  always_ff @(posedge vga_clk) begin
    r       <= r_in;
    g       <= g_in;
    b       <= b_in;
    blank_n <= blank_n_in;
  end

endmodule
