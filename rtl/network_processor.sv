// network_processor: front end of one input port.
//
// Takes a whole packet (destination address, length in cells, and up to
// MAX_CELLS cells of payload), looks up the output port the packet must
// leave by, and hands the packet to the queue manager one fixed-length cell
// per cycle, each tagged with that output port, so that it is stored in the
// right virtual output queue.
//
// Route lookup: a table of 2^RT_AW entries, indexed by the low RT_AW bits
// of the destination address, gives the output port. It is written through
// rt_wr_*; after reset entry a holds port a mod N. Lookup happens when the
// packet is accepted.
//
// Handshakes (valid/ready): the packet is taken when pkt_valid & pkt_ready;
// cell k (pkt_data[k*W +: W]) is offered on cell_* until cell_ready, which
// is low while the input's buffer is full (the stall). A new packet can be
// accepted in the cycle its predecessor's last cell goes, so a packet of L
// cells occupies L cycles when nothing stalls.
//
// What this unit does (read the destination, determine the output, split
// into cells, place them in the VOQ) follows the published scheduler; the
// packet format, the direct-indexed route table and the handshakes are this
// implementation's own. Only the low RT_AW destination bits are looked at,
// so lint reports the upper bits of pkt_dst as unused.
module network_processor #(
  parameter int unsigned N         = router_pkg::N_PORTS,
  parameter int unsigned W         = router_pkg::CELL_W,
  parameter int unsigned MAX_CELLS = router_pkg::MAX_CELLS,
  parameter int unsigned DST_W     = router_pkg::DST_W,
  parameter int unsigned RT_AW     = router_pkg::RT_AW,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned LW = $clog2(MAX_CELLS + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  // packet in
  input  logic                   pkt_valid,
  output logic                   pkt_ready,
  input  logic [DST_W-1:0]       pkt_dst,
  input  logic [LW-1:0]          pkt_len,     // 1..MAX_CELLS
  input  logic [MAX_CELLS*W-1:0] pkt_data,
  // route table write
  input  logic                   rt_wr_en,
  input  logic [RT_AW-1:0]       rt_wr_addr,
  input  logic [NW-1:0]          rt_wr_port,
  // cells out, to the queue manager and data memory
  output logic                   cell_valid,
  input  logic                   cell_ready,
  output logic [NW-1:0]          cell_port,
  output logic [W-1:0]           cell_data
);
  logic [NW-1:0]          route [2**RT_AW];
  logic                   busy;
  logic [LW-1:0]          len_q, idx_q;
  logic [NW-1:0]          port_q;
  logic [MAX_CELLS*W-1:0] data_q;
  logic                   cell_fire, last_cell, pkt_fire;

  assign cell_valid = busy;
  assign cell_port  = port_q;
  assign cell_data  = data_q[idx_q*W +: W];
  assign cell_fire  = cell_valid && cell_ready;
  assign last_cell  = (idx_q == len_q - LW'(1));
  assign pkt_ready  = !busy || (cell_fire && last_cell);
  assign pkt_fire   = pkt_valid && pkt_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned a = 0; a < 2**RT_AW; a++)
        route[a] <= NW'(a % N);
    end else if (rt_wr_en) begin
      route[rt_wr_addr] <= rt_wr_port;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      len_q  <= '0;
      idx_q  <= '0;
      port_q <= '0;
      data_q <= '0;
    end else begin
      if (cell_fire) idx_q <= idx_q + LW'(1);
      if (cell_fire && last_cell) busy <= 1'b0;
      if (pkt_fire) begin
        busy   <= 1'b1;
        len_q  <= pkt_len;
        idx_q  <= '0;
        port_q <= route[pkt_dst[RT_AW-1:0]];
        data_q <= pkt_data;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(pkt_fire && (pkt_len == '0 || pkt_len > LW'(MAX_CELLS))))
        else $error("network_processor: packet length %0d out of range", pkt_len);
    end
  end
endmodule
