// router_scheduler: non-blocking scheduler of an N x N input-buffered router.
//
// N input ports (input_port), each buffering up to F cells in N virtual
// output queues, are chained for sequential greedy scheduling (SGS): in
// every time slot input 0 picks the first output it has unscheduled cells
// for, passes the set of outputs still free to input 1, and so on, so each
// output is granted to at most one input per slot. The result is a maximal
// matching for every slot. Each input stores its pick in its output memory
// and, one frame of F slots later, sends that cell; hence in any cycle the
// cells leaving the inputs go to distinct outputs and a crossbar fabric can
// carry them without blocking.
//
// One clock cycle is one slot; the slot counter (0..F-1) wraps each frame.
// Ports: per input i a packet interface (pkt_*[i]), a route-table write
// port (rt_wr_*[i]), a scheduling enable (sched_en[i], where traffic
// policing would connect), and the cell towards the switch fabric
// (out_valid[i], out_port[i], out_data[i]), which is not part of this RTL.
// sched_q[i] shows input i's grant in the current slot; avail_last the
// outputs no input took; buf_full, voq_empty and np_stall the buffer state
// per input.
// SGS, the chain and the per-input blocks follow the published scheduler.
// The fixed chain order (input 0 first), the purely combinational chain
// within one cycle and the one-frame schedule delay are this
// implementation's choice.
module router_scheduler #(
  parameter int unsigned N         = router_pkg::N_PORTS,
  parameter int unsigned F         = router_pkg::FRAME,
  parameter int unsigned W         = router_pkg::CELL_W,
  parameter int unsigned MAX_CELLS = router_pkg::MAX_CELLS,
  parameter int unsigned DST_W     = router_pkg::DST_W,
  parameter int unsigned RT_AW     = router_pkg::RT_AW,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW = (F > 1) ? $clog2(F) : 1,
  localparam int unsigned LW = $clog2(MAX_CELLS + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   pkt_valid  [N],
  output logic                   pkt_ready  [N],
  input  logic [DST_W-1:0]       pkt_dst    [N],
  input  logic [LW-1:0]          pkt_len    [N],
  input  logic [MAX_CELLS*W-1:0] pkt_data   [N],
  input  logic                   rt_wr_en   [N],
  input  logic [RT_AW-1:0]       rt_wr_addr [N],
  input  logic [NW-1:0]          rt_wr_port [N],
  input  logic [N-1:0]           sched_en,
  output logic [SW-1:0]          slot,
  output logic [N-1:0]           sched_q    [N],
  output logic [N-1:0]           avail_last,
  output logic                   out_valid  [N],
  output logic [NW-1:0]          out_port   [N],
  output logic [W-1:0]           out_data   [N],
  output logic [N-1:0]           buf_full,
  output logic [N-1:0]           voq_empty  [N],
  output logic [N-1:0]           np_stall
);
  // avail[i] is what input i sees; avail[N] is what is left after all.
  logic [N-1:0] avail [N+1];

  always_ff @(posedge clk) begin
    if (rst) slot <= '0;
    else     slot <= (slot == SW'(F - 1)) ? '0 : slot + SW'(1);
  end

  assign avail[0]   = '1;
  assign avail_last = avail[N];

  for (genvar i = 0; i < N; i++) begin : g_in
    input_port #(
      .N(N), .F(F), .W(W), .MAX_CELLS(MAX_CELLS), .DST_W(DST_W), .RT_AW(RT_AW)
    ) u_in (
      .clk, .rst,
      .pkt_valid (pkt_valid[i]), .pkt_ready(pkt_ready[i]),
      .pkt_dst   (pkt_dst[i]),   .pkt_len  (pkt_len[i]), .pkt_data(pkt_data[i]),
      .rt_wr_en  (rt_wr_en[i]),  .rt_wr_addr(rt_wr_addr[i]), .rt_wr_port(rt_wr_port[i]),
      .slot      (slot),         .sched_en (sched_en[i]),
      .avail_in  (avail[i]),     .avail_out(avail[i+1]), .sched_q(sched_q[i]),
      .out_valid (out_valid[i]), .out_port (out_port[i]), .out_data(out_data[i]),
      .buf_full  (buf_full[i]),  .voq_empty(voq_empty[i]), .np_stall(np_stall[i])
    );
  end

  // Non-blocking: the cells sent in one cycle go to distinct outputs.
  always_ff @(posedge clk) begin
    if (!rst) begin
      for (int a = 0; a < N; a++)
        for (int b = a + 1; b < N; b++)
          assert (!(out_valid[a] && out_valid[b] && out_port[a] == out_port[b]))
            else $error("router_scheduler: inputs %0d and %0d both send to output %0d",
                        a, b, out_port[a]);
    end
  end
endmodule
