// mem_reader_divider: reads the stored image and divides it into N_LANES
// sub-images, one pixel stream per compression core.
//
// The image memory is banked by stripe, so dividing the picture is reading
// bank k for lane k. A start pulse rewinds every lane to address 0. Each lane
// then reads its BANK_DEPTH pixels in order and presents them on a
// valid/ready stream; pix_last marks the final pixel of the stripe. The read
// enable is raised only when the lane's output register is free or being
// taken, so the memory's registered read data doubles as the output register
// and a stalled core stalls only its own lane. Throughput is one pixel per
// cycle per lane. The document gives the function (read from memory and
// divide into sub-images); the stream handshake is this design's own.
module mem_reader_divider #(
  parameter int unsigned N_LANES    = 8,
  parameter int unsigned BANK_DEPTH = 8192,
  parameter int unsigned PIX_W      = 8,
  localparam int unsigned BW = $clog2(BANK_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic [N_LANES-1:0]   mem_re,
  output logic [BW-1:0]        mem_raddr [N_LANES],
  input  logic [PIX_W-1:0]     mem_rdata [N_LANES],
  output logic [N_LANES-1:0]   pix_valid,
  input  logic [N_LANES-1:0]   pix_ready,
  output logic [PIX_W-1:0]     pix_data  [N_LANES],
  output logic [N_LANES-1:0]   pix_last
);
  logic [N_LANES-1:0] active;

  assign busy = |active || |pix_valid;

  for (genvar k = 0; k < N_LANES; k++) begin : g_lane
    logic [BW:0] addr;              // next address to read, BANK_DEPTH = done
    wire         free = pix_ready[k] || !pix_valid[k];

    assign mem_re[k]    = active[k] && free;
    assign mem_raddr[k] = addr[BW-1:0];
    assign pix_data[k]  = mem_rdata[k];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        addr <= '0; active[k] <= 1'b0; pix_valid[k] <= 1'b0; pix_last[k] <= 1'b0;
      end else if (start) begin
        addr <= '0; active[k] <= 1'b1; pix_valid[k] <= 1'b0; pix_last[k] <= 1'b0;
      end else if (free) begin
        pix_valid[k] <= active[k];
        pix_last[k]  <= active[k] && (addr == (BW+1)'(BANK_DEPTH - 1));
        if (active[k]) begin
          addr <= addr + 1'b1;
          if (addr == (BW+1)'(BANK_DEPTH - 1)) active[k] <= 1'b0;
        end
      end
    end

    // valid/ready rule: a pixel offered and not taken stays unchanged
    a_hold: assert property (@(posedge clk) disable iff (!rst_n || start)
                             pix_valid[k] && !pix_ready[k] |=> pix_valid[k] && $stable(pix_data[k]))
      else $error("mem_reader_divider: pixel changed while stalled");
  end
endmodule
