// input_port: one input of the router with its part of the scheduler.
//
// Blocks and their links:
//   network_processor  -> cells tagged with their output port
//   queue_manager      <-> linked_list_memory (VQL/EQL pointers and links)
//   data_memory        cells at the locations the queue manager hands out
//   output_selector    picks this slot's output from the unscheduled VQLs
//   output_memory      keeps the picks for one frame, then drives departures
//
// Each clock cycle is one time slot; slot (0..F-1) is the slot number in the
// frame, shared by all inputs. In a slot:
//  * a cell from the network processor is accepted if a buffer location is
//    free (else the processor stalls) and joins the VQL of its output;
//  * sequential greedy scheduling: r = unsched & avail_in, i.e. outputs for
//    which this input has unscheduled cells and that no earlier input took
//    in this slot. If sched_en, the output selector grants the lowest such
//    output, the queue manager marks that cell scheduled, the pick is stored
//    in the output memory for this slot of the next frame, and
//    avail_out = avail_in & ~q is passed to the next input of the chain;
//  * the output memory entry stored one frame earlier for this slot is read:
//    if valid, the head cell of that output's VQL departs. Its location goes
//    back to the empty list and the cell appears on out_data one cycle later
//    with out_valid and out_port, towards the switch fabric.
// So a cell leaves exactly F+1 cycles after the slot in which it was
// scheduled (F slots in the output memory, one in the data-memory read).
// The block set and their links follow the published input port; the slot
// timing is this implementation's. The chain of availability between
// inputs is combinational.
module input_port #(
  parameter int unsigned N         = router_pkg::N_PORTS,
  parameter int unsigned F         = router_pkg::FRAME,
  parameter int unsigned W         = router_pkg::CELL_W,
  parameter int unsigned MAX_CELLS = router_pkg::MAX_CELLS,
  parameter int unsigned DST_W     = router_pkg::DST_W,
  parameter int unsigned RT_AW     = router_pkg::RT_AW,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW = (F > 1) ? $clog2(F) : 1,
  localparam int unsigned LW = $clog2(MAX_CELLS + 1),
  localparam int unsigned PW = router_pkg::ptr_width(F)
) (
  input  logic                   clk,
  input  logic                   rst,
  // packets from the line
  input  logic                   pkt_valid,
  output logic                   pkt_ready,
  input  logic [DST_W-1:0]       pkt_dst,
  input  logic [LW-1:0]          pkt_len,
  input  logic [MAX_CELLS*W-1:0] pkt_data,
  // route table write
  input  logic                   rt_wr_en,
  input  logic [RT_AW-1:0]       rt_wr_addr,
  input  logic [NW-1:0]          rt_wr_port,
  // slot and scheduling chain
  input  logic [SW-1:0]          slot,
  input  logic                   sched_en,
  input  logic [N-1:0]           avail_in,
  output logic [N-1:0]           avail_out,
  output logic [N-1:0]           sched_q,
  // cells to the switch fabric
  output logic                   out_valid,
  output logic [NW-1:0]          out_port,
  output logic [W-1:0]           out_data,
  // status: buffer full, per-output queue empty, processor stalled
  output logic                   buf_full,
  output logic [N-1:0]           voq_empty,
  output logic                   np_stall
);
  // network processor <-> queue manager / data memory
  logic          cell_valid, cell_ready;
  logic [NW-1:0] cell_port;
  logic [W-1:0]  cell_data;
  logic [PW-1:0] arr_addr;

  // scheduling
  logic [N-1:0]  unsched, req;
  logic          sel_c;
  logic          om_rd_valid;
  logic [NW-1:0] om_rd_port;
  logic [NW-1:0] q_idx;

  // departure
  logic [PW-1:0] dep_addr;

  // linked-list memory
  logic [PW-1:0] lm_rd_addr [3];
  logic [PW-1:0] lm_rd_data [3];
  logic          lm_wr_en   [2];
  logic [PW-1:0] lm_wr_addr [2];
  logic [PW-1:0] lm_wr_data [2];

  network_processor #(
    .N(N), .W(W), .MAX_CELLS(MAX_CELLS), .DST_W(DST_W), .RT_AW(RT_AW)
  ) u_np (
    .clk, .rst,
    .pkt_valid, .pkt_ready, .pkt_dst, .pkt_len, .pkt_data,
    .rt_wr_en, .rt_wr_addr, .rt_wr_port,
    .cell_valid, .cell_ready, .cell_port, .cell_data
  );

  queue_manager #(.N(N), .F(F)) u_qm (
    .clk, .rst,
    .arr_valid (cell_valid), .arr_port(cell_port),
    .arr_ready (cell_ready), .arr_addr(arr_addr),
    .sched_q   (sched_q),    .unsched (unsched),
    .dep_valid (om_rd_valid), .dep_port(om_rd_port), .dep_addr(dep_addr),
    .lm_rd_addr, .lm_rd_data, .lm_wr_en, .lm_wr_addr, .lm_wr_data,
    .eql_empty (buf_full), .vql_empty(voq_empty)
  );

  linked_list_memory #(.F(F), .NR(3), .NW(2)) u_llm (
    .clk, .rst,
    .rd_addr(lm_rd_addr), .rd_data(lm_rd_data),
    .wr_en  (lm_wr_en),   .wr_addr(lm_wr_addr), .wr_data(lm_wr_data)
  );

  data_memory #(.F(F), .W(W)) u_dm (
    .clk, .rst,
    .wr_en   (cell_valid && cell_ready), .wr_addr(arr_addr), .wr_data(cell_data),
    .rd_en   (om_rd_valid), .rd_addr(dep_addr),
    .rd_valid(out_valid), .rd_data(out_data)
  );

  assign req = unsched & avail_in;

  output_selector #(.N(N)) u_sel (
    .e(sched_en), .r(req), .q(sched_q), .c(sel_c)
  );

  assign avail_out = avail_in & ~sched_q;

  always_comb begin
    q_idx = '0;
    for (int j = N - 1; j >= 0; j--)
      if (sched_q[j]) q_idx = NW'(j);
  end

  output_memory #(.F(F), .N(N)) u_om (
    .clk, .rst, .slot,
    .rd_valid(om_rd_valid), .rd_port(om_rd_port),
    .wr_en   (1'b1), .wr_valid(|sched_q), .wr_port(q_idx)
  );

  // Output port of the cell being read, aligned with the data-memory read.
  always_ff @(posedge clk) begin
    if (rst) out_port <= '0;
    else if (om_rd_valid) out_port <= om_rd_port;
  end

  assign np_stall = cell_valid && !cell_ready;

  // sel_c only says that some request was present; it must agree with req.
  always_ff @(posedge clk) begin
    if (!rst) assert (sel_c == |req) else $error("input_port: selector summary mismatch");
  end
endmodule
