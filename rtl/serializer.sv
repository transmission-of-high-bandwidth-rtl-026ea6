// serializer: PMA serializer (SER) of one transmit lane.
//
// Two clocks, as in the transceiver: the 10-bit parallel code is produced on
// the low-speed clock and the line is driven on the high-speed clock, which
// runs RATIO times faster and is phase-locked to it. A phase counter on
// clk_ser reloads the shift register from par_in every RATIO bit times; the
// parallel register is stable for a whole low-speed period, so every code is
// taken exactly once whatever the counter's phase. Bits leave MSB first
// (code bit 'a' first). The document gives the SER and its two clocks; the
// reload scheme is this design's own.
module serializer #(
  parameter int unsigned RATIO = 10
) (
  input  logic             clk_ser,
  input  logic             rst_n,
  input  logic [RATIO-1:0] par_in,
  output logic             ser_out
);
  logic [RATIO-1:0]         sh;
  logic [$clog2(RATIO)-1:0] ph;

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; ph <= '0;
    end else begin
      if (ph == '0) sh <= par_in;
      else          sh <= {sh[RATIO-2:0], 1'b0};
      ph <= (ph == ($bits(ph))'(RATIO - 1)) ? '0 : ph + 1'b1;
    end
  end

  assign ser_out = sh[RATIO-1];
endmodule
