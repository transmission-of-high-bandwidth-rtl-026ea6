// slmc_top: scalable multi-link image link with real-time run-length
// compression, both ends in one module.
//
// Transmit side (camera end): the camera writes an image into tx_frame_memory.
// A start pulse makes mem_reader_divider stream the N_LANES horizontal stripes
// of the image in parallel, one pixel per clock per lane. Per lane, a
// run-length compression core (application layer) feeds a transport
// controller FIFO, which feeds a frame generator and a transmitter device
// (8b/10b PCS + serializer PMA) driving tx_serial[k].
// Receive side (vision-system end): per lane, a receiver device
// (deserializer + 8b/10b decoder) feeds a frame checker, a transport
// controller FIFO and a decompression core; writer_combiner puts each lane's
// pixels into its bank of rx_frame_memory, from which the host reads the
// rebuilt image. image_done rises when every lane has delivered its stripe.
// The two sides share only clocks, reset and the serial lanes: 'start' arms
// the transmit side, and the host arms the receive side for the next image
// with its own 'rx_arm' pulse (clears sequence numbers, counters, pixel
// counts and image_done), given before the transmit side starts.
// Three perf_timer controllers measure, in clk cycles, the compression time
// (first pixel into a core to the last token handed to the transport layer on
// every lane), the transmission time (first byte taken from the transport
// layer to the last end delimiter entering the serializer on every lane) and
// the execution time (first of these starts to the last of these ends).
// comp_bytes counts the compressed image size in bytes, so that the
// compression ratio is IMG_W*IMG_H*PIX_W/8 / comp_bytes.
// The serial lines are ports so that the cable (physical medium) sits
// outside; connect tx_serial to rx_serial for a loop-back. clk is the 125 MHz
// system clock and clk_ser the bit clock, RATIO = 10 times faster and
// phase-locked to clk. Lane count, the layering and the 8b/10b line code
// follow the document; image size, pixel width, compression algorithm, frame
// format and buffer depths are this design's own choices.
module slmc_top
  import slmc_pkg::*;
#(
  parameter int unsigned N_LANES     = 8,
  parameter int unsigned IMG_W       = 256,
  parameter int unsigned IMG_H       = 256,
  parameter int unsigned PIX_W       = 8,
  parameter int unsigned MAX_PAYLOAD = 256,
  parameter int unsigned TX_FIFO     = 16,
  parameter int unsigned RX_FIFO     = 512,
  localparam int unsigned NPIX       = IMG_W * IMG_H,
  localparam int unsigned BANK_DEPTH = NPIX / N_LANES,
  localparam int unsigned AW         = $clog2(NPIX),
  localparam int unsigned BW         = $clog2(BANK_DEPTH)
) (
  input  logic               clk,
  input  logic               clk_ser,
  input  logic               rst_n,
  // camera: image into the transmit memory
  input  logic               cam_we,
  input  logic [AW-1:0]      cam_addr,
  input  logic [PIX_W-1:0]   cam_data,
  input  logic               start,
  output logic               tx_busy,
  // serial lanes (to and from the physical medium)
  output logic [N_LANES-1:0] tx_serial,
  input  logic [N_LANES-1:0] rx_serial,
  // vision system: image out of the receive memory
  input  logic               rx_arm,
  input  logic [AW-1:0]      host_raddr,
  output logic [PIX_W-1:0]   host_rdata,
  output logic               image_done,
  // measurements and status
  output logic [31:0]        comp_cycles,
  output logic [31:0]        tx_cycles,
  output logic [31:0]        exec_cycles,
  output logic [31:0]        comp_bytes,
  output logic               timers_done,
  output lane_status_t       lane_status [N_LANES]
);
  // ---------------- transmit side ----------------
  logic [N_LANES-1:0] rd_re;
  logic [BW-1:0]      rd_addr [N_LANES];
  logic [PIX_W-1:0]   rd_data [N_LANES];
  logic [N_LANES-1:0] px_valid, px_ready, px_last;
  logic [PIX_W-1:0]   px_data [N_LANES];

  tx_frame_memory #(.N_LANES(N_LANES), .BANK_DEPTH(BANK_DEPTH), .PIX_W(PIX_W)) u_tx_mem (
    .clk, .we(cam_we), .waddr(cam_addr), .wdata(cam_data),
    .re(rd_re), .raddr(rd_addr), .rdata(rd_data)
  );

  mem_reader_divider #(.N_LANES(N_LANES), .BANK_DEPTH(BANK_DEPTH), .PIX_W(PIX_W)) u_reader (
    .clk, .rst_n, .start, .busy(tx_busy),
    .mem_re(rd_re), .mem_raddr(rd_addr), .mem_rdata(rd_data),
    .pix_valid(px_valid), .pix_ready(px_ready), .pix_data(px_data), .pix_last(px_last)
  );

  logic [N_LANES-1:0] tok_take, tok_take_last, first_byte, image_sent;

  for (genvar k = 0; k < N_LANES; k++) begin : g_tx
    rle_token_t tok;
    logic       tok_valid, tok_ready;
    logic       b_valid, b_ready, b_last;
    logic [7:0] b_data;
    logic       c_k;
    logic [7:0] c_data;

    rle_compressor #(.PIX_W(PIX_W)) u_comp (
      .clk, .rst_n,
      .in_valid(px_valid[k]), .in_ready(px_ready[k]), .in_data(px_data[k]), .in_last(px_last[k]),
      .out_valid(tok_valid), .out_ready(tok_ready), .out_token(tok)
    );
    assign tok_take[k]      = tok_valid && tok_ready;
    assign tok_take_last[k] = tok_take[k] && tok.last;

    tx_controller #(.DEPTH(TX_FIFO)) u_ctl (
      .clk, .rst_n, .tok_valid, .tok_ready, .tok,
      .byte_valid(b_valid), .byte_ready(b_ready), .byte_data(b_data), .byte_last(b_last)
    );

    frame_generator #(.MAX_PAYLOAD(MAX_PAYLOAD)) u_fgen (
      .clk, .rst_n, .lane_id(8'(k)), .start,
      .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data), .in_last(b_last),
      .tx_k(c_k), .tx_data(c_data),
      .first_byte(first_byte[k]), .image_sent(image_sent[k]), .fill_sent()
    );

    tx_device u_txdev (
      .clk, .clk_ser, .rst_n, .tx_k(c_k), .tx_data(c_data), .ser_out(tx_serial[k])
    );
  end

  // ---------------- receive side ----------------
  logic [N_LANES-1:0] dp_valid, dp_last, wr_we, lane_done;
  logic [PIX_W-1:0]   dp_data [N_LANES];
  logic [BW-1:0]      wr_addr [N_LANES];
  logic [PIX_W-1:0]   wr_data [N_LANES];

  for (genvar k = 0; k < N_LANES; k++) begin : g_rx
    logic         aligned, r_k, cerr, derr, p_valid, t_valid, t_ready, ovf;
    logic [7:0]   r_data, p_data, t_count, t_value;
    lane_status_t st;

    rx_device u_rxdev (
      .clk, .clk_ser, .rst_n, .ser_in(rx_serial[k]), .aligned,
      .rx_k(r_k), .rx_data(r_data), .code_err(cerr), .disp_err(derr)
    );

    frame_checker u_fchk (
      .clk, .rst_n, .lane_id(8'(k)), .start(rx_arm), .aligned,
      .rx_k(r_k), .rx_data(r_data), .code_err(cerr), .disp_err(derr),
      .pay_valid(p_valid), .pay_data(p_data), .frame_end(), .status(st)
    );

    rx_controller #(.DEPTH(RX_FIFO)) u_ctl (
      .clk, .rst_n, .start(rx_arm), .in_valid(p_valid), .in_data(p_data),
      .tok_valid(t_valid), .tok_ready(t_ready), .tok_count(t_count), .tok_value(t_value),
      .overflow(ovf)
    );

    rle_decompressor #(.PIXELS(BANK_DEPTH), .PIX_W(PIX_W)) u_decomp (
      .clk, .rst_n, .start(rx_arm),
      .tok_valid(t_valid), .tok_ready(t_ready), .tok_count(t_count), .tok_value(t_value),
      .pix_valid(dp_valid[k]), .pix_data(dp_data[k]), .pix_last(dp_last[k])
    );

    always_comb begin
      lane_status[k]          = st;
      lane_status[k].overflow = ovf;
    end
  end

  writer_combiner #(.N_LANES(N_LANES), .BANK_DEPTH(BANK_DEPTH), .PIX_W(PIX_W)) u_comb (
    .clk, .rst_n, .start(rx_arm),
    .pix_valid(dp_valid), .pix_data(dp_data), .pix_last(dp_last),
    .mem_we(wr_we), .mem_waddr(wr_addr), .mem_wdata(wr_data),
    .lane_done, .image_done
  );

  rx_frame_memory #(.N_LANES(N_LANES), .BANK_DEPTH(BANK_DEPTH), .PIX_W(PIX_W)) u_rx_mem (
    .clk, .we(wr_we), .waddr(wr_addr), .wdata(wr_data), .raddr(host_raddr), .rdata(host_rdata)
  );

  // ---------------- time measurement ----------------
  logic [N_LANES-1:0] comp_end_seen, tx_end_seen, sent_d1, sent_d2;
  logic               comp_done, tx_done, exec_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comp_end_seen <= '0; tx_end_seen <= '0; sent_d1 <= '0; sent_d2 <= '0;
    end else if (start) begin
      comp_end_seen <= '0; tx_end_seen <= '0; sent_d1 <= '0; sent_d2 <= '0;
    end else begin
      comp_end_seen <= comp_end_seen | tok_take_last;
      // the last delimiter reaches the line two clocks after the frame
      // generator issues it (encoder register, then serializer reload)
      sent_d1       <= image_sent;
      sent_d2       <= sent_d1;
      tx_end_seen   <= tx_end_seen | sent_d2;
    end
  end

  wire comp_start = |(px_valid & px_ready);
  wire comp_end   = &(comp_end_seen | tok_take_last);
  wire tx_start   = |first_byte;
  wire tx_end     = &(tx_end_seen | sent_d2);

  perf_timer u_t_comp (
    .clk, .rst_n, .clear(start), .start_trig(comp_start), .end_trig(comp_end),
    .cycles(comp_cycles), .running(), .done(comp_done)
  );
  perf_timer u_t_tx (
    .clk, .rst_n, .clear(start), .start_trig(tx_start), .end_trig(tx_end),
    .cycles(tx_cycles), .running(), .done(tx_done)
  );
  perf_timer u_t_exec (
    .clk, .rst_n, .clear(start), .start_trig(comp_start), .end_trig(tx_end),
    .cycles(exec_cycles), .running(), .done(exec_done)
  );

  assign timers_done = comp_done && tx_done && exec_done;

  // compressed image size: two bytes per token handed to the transport layer,
  // summed over all lanes; cleared by start
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     comp_bytes <= '0;
    else if (start) comp_bytes <= '0;
    else            comp_bytes <= comp_bytes + 32'(2 * $countones(tok_take));
  end
endmodule
