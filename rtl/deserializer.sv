// deserializer: PMA deserializer (DES) of one receive lane.
//
// The line is shifted in on the high-speed clock. Whenever the last ten
// bits equal a K28.5 symbol (either disparity) the word boundary is set
// there and 'aligned' rises; a comma at a different phase moves the boundary.
// At each boundary the ten bits are copied to a holding register, which
// therefore changes once per low-speed period. The low-speed clock is
// phase-locked to the high-speed one (ratio RATIO), so the receive logic may
// sample par_out on every low-speed edge and sees each code exactly once; in
// a device with an independent recovered clock this register is the place of
// a phase-compensation buffer. The document gives the DES and its two
// clocks; comma alignment is this design's own choice, taken from Gigabit
// Ethernet.
module deserializer
  import slmc_pkg::*;
#(
  parameter int unsigned RATIO = 10
) (
  input  logic             clk_ser,
  input  logic             rst_n,
  input  logic             ser_in,
  output logic [RATIO-1:0] par_out,
  output logic             aligned
);
  logic [RATIO-1:0]         sh;
  logic [$clog2(RATIO)-1:0] ph;
  wire  [RATIO-1:0]         win = {sh[RATIO-2:0], ser_in};
  wire                      comma = (win == RATIO'(COMMA_NEG)) || (win == RATIO'(COMMA_POS));

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; ph <= '0; par_out <= RATIO'(COMMA_NEG); aligned <= 1'b0;
    end else begin
      sh <= win;
      if (comma) begin
        ph      <= '0;
        aligned <= 1'b1;
        par_out <= win;
      end else if (ph == ($bits(ph))'(RATIO - 1)) begin
        ph <= '0;
        if (aligned) par_out <= win;
      end else begin
        ph <= ph + 1'b1;
      end
    end
  end
endmodule
