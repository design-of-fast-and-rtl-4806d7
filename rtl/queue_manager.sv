// queue_manager: pointer keeper of the virtual output queues of one input.
//
// The cells of an input are kept in N virtual-queue lists (VQLs), one per
// output, and the free locations in the empty-queue list (EQL), all linked
// through the linked-list memory. Each VQL has three pointers: head (oldest
// cell, next to depart), first unscheduled cell, and tail. The EQL has head
// and tail. Pointer 0 is NULL.
//
// Three operations, any combination of them in one slot (one cycle), on the
// same or different VQLs:
//  * arrival (arr_valid & arr_ready): the EQL head location is handed out on
//    arr_addr (the cell is written there), unlinked from the EQL and linked
//    to the tail of VQL arr_port. arr_ready is low while the EQL is empty:
//    the buffer is full and the sender must stall.
//  * schedule (sched_q, one-hot): the first-unscheduled pointer of the
//    chosen VQL moves on to the next cell, or to NULL if it was the tail.
//    unsched[j] tells the output selector that VQL j holds unscheduled cells.
//  * departure (dep_valid): the head of VQL dep_port, shown on dep_addr, is
//    unlinked and appended to the EQL tail.
// All pointer updates land at the clock edge; memory reads are
// combinational through lm_rd_*, link writes go out on lm_wr_*.
// Read port 0 follows the EQL head, 1 the scheduled cell, 2 the departing
// VQL head. Write port 0 links a VQL tail, write port 1 the EQL tail.
// The pointer set and the update rules follow the published scheduler;
// doing all three operations in one cycle, with the same-slot interactions
// resolved as below, is this implementation's own.
module queue_manager #(
  parameter int unsigned N = router_pkg::N_PORTS,
  parameter int unsigned F = router_pkg::FRAME,
  localparam int unsigned PW = router_pkg::ptr_width(F),
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  // arrival
  input  logic          arr_valid,
  input  logic [NW-1:0] arr_port,
  output logic          arr_ready,
  output logic [PW-1:0] arr_addr,
  // schedule
  input  logic [N-1:0]  sched_q,
  output logic [N-1:0]  unsched,
  // departure
  input  logic          dep_valid,
  input  logic [NW-1:0] dep_port,
  output logic [PW-1:0] dep_addr,
  // linked-list memory
  output logic [PW-1:0] lm_rd_addr [3],
  input  logic [PW-1:0] lm_rd_data [3],
  output logic          lm_wr_en   [2],
  output logic [PW-1:0] lm_wr_addr [2],
  output logic [PW-1:0] lm_wr_data [2],
  // status
  output logic          eql_empty,
  output logic [N-1:0]  vql_empty
);
  localparam logic [PW-1:0] NULL = '0;

  logic [PW-1:0] vh [N];   // VQL head
  logic [PW-1:0] vu [N];   // VQL first unscheduled
  logic [PW-1:0] vt [N];   // VQL tail
  logic [PW-1:0] eh, et;   // EQL head, tail

  logic [PW-1:0] vh_n [N];
  logic [PW-1:0] vu_n [N];
  logic [PW-1:0] vt_n [N];
  logic [PW-1:0] eh_n, et_n;

  logic          arr_fire, sched_any;
  logic [NW-1:0] sched_idx;

  assign eql_empty = (eh == NULL);
  assign arr_ready = !eql_empty;
  assign arr_fire  = arr_valid && arr_ready;
  assign arr_addr  = eh;
  assign dep_addr  = vh[dep_port];

  always_comb begin
    for (int j = 0; j < N; j++) begin
      unsched[j]   = (vu[j] != NULL);
      vql_empty[j] = (vh[j] == NULL);
    end
  end

  always_comb begin
    sched_any = |sched_q;
    sched_idx = '0;
    for (int j = N - 1; j >= 0; j--)
      if (sched_q[j]) sched_idx = NW'(j);
  end

  assign lm_rd_addr[0] = eh;
  assign lm_rd_addr[1] = vu[sched_idx];
  assign lm_rd_addr[2] = vh[dep_port];

  always_comb begin
    logic [PW-1:0] e_h, e_t;
    for (int j = 0; j < N; j++) begin
      vh_n[j] = vh[j];
      vu_n[j] = vu[j];
      vt_n[j] = vt[j];
    end
    e_h = eh;
    e_t = et;
    for (int w = 0; w < 2; w++) begin
      lm_wr_en[w]   = 1'b0;
      lm_wr_addr[w] = NULL;
      lm_wr_data[w] = NULL;
    end

    // Departure: unlink the head of VQL dep_port.
    if (dep_valid) begin
      if (vh[dep_port] == vt[dep_port]) begin
        vh_n[dep_port] = NULL;
        vt_n[dep_port] = NULL;
      end else begin
        vh_n[dep_port] = lm_rd_data[2];
      end
    end

    // Schedule: advance the first-unscheduled pointer of the chosen VQL.
    if (sched_any) begin
      if (vu[sched_idx] == vt[sched_idx]) vu_n[sched_idx] = NULL;
      else                                vu_n[sched_idx] = lm_rd_data[1];
    end

    // Arrival: take the EQL head and link it to the tail of VQL arr_port.
    if (arr_fire) begin
      if (eh == et) begin
        e_h = NULL;
        e_t = NULL;
      end else begin
        e_h = lm_rd_data[0];
      end
      if (vt_n[arr_port] == NULL) begin
        vh_n[arr_port] = eh;
      end else begin
        lm_wr_en[0]   = 1'b1;
        lm_wr_addr[0] = vt_n[arr_port];
        lm_wr_data[0] = eh;
      end
      vt_n[arr_port] = eh;
      if (vu_n[arr_port] == NULL) vu_n[arr_port] = eh;
    end

    // Departure: the freed location joins the tail of the EQL.
    if (dep_valid) begin
      if (e_t == NULL) begin
        e_h = vh[dep_port];
      end else begin
        lm_wr_en[1]   = 1'b1;
        lm_wr_addr[1] = e_t;
        lm_wr_data[1] = vh[dep_port];
      end
      e_t = vh[dep_port];
    end

    eh_n = e_h;
    et_n = e_t;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < N; j++) begin
        vh[j] <= NULL;
        vu[j] <= NULL;
        vt[j] <= NULL;
      end
      // After reset all F locations form the EQL, 1 -> 2 -> ... -> F.
      eh <= PW'(1);
      et <= PW'(F);
    end else begin
      for (int j = 0; j < N; j++) begin
        vh[j] <= vh_n[j];
        vu[j] <= vu_n[j];
        vt[j] <= vt_n[j];
      end
      eh <= eh_n;
      et <= et_n;
    end
  end

  // Handshake rules.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert ($countones(sched_q) <= 1)
        else $error("queue_manager: schedule vector not one-hot");
      assert (!(sched_any && vu[sched_idx] == NULL))
        else $error("queue_manager: scheduling a VQL with no unscheduled cell");
      // Only a scheduled cell may depart: the head must exist and must not
      // be the first unscheduled cell.
      assert (!(dep_valid && (vh[dep_port] == NULL || vh[dep_port] == vu[dep_port])))
        else $error("queue_manager: departure of an unscheduled or missing cell");
    end
  end
endmodule
