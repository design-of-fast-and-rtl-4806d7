// linked_list_memory: next-pointer store of the cell-buffer linked lists.
//
// Location L (1..F) holds the pointer to the location that follows L in the
// list L belongs to: one of the virtual-queue lists (VQLs, one per output)
// or the empty-queue list (EQL). Pointer 0 is NULL. There are F locations,
// one per data-memory cell.
//
// After reset every location belongs to the EQL: location L points to L+1
// and the last location points to NULL, as the published scheme requires.
//
// Ports: NR asynchronous read ports (rd_addr -> rd_data in the same cycle)
// and NW write ports that take effect at the clock edge. The queue manager
// needs three reads (EQL head, first unscheduled cell, VQL head) and two
// writes (VQL tail link, EQL tail link) per slot; the number of ports and
// the register-file style are this implementation's choice. Writes from two ports
// to one location in one cycle are a usage error (asserted); the higher
// port number wins. Reading address 0 returns 0.
module linked_list_memory #(
  parameter int unsigned F  = router_pkg::FRAME,
  parameter int unsigned NR = 3,
  parameter int unsigned NW = 2,
  localparam int unsigned PW = router_pkg::ptr_width(F)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [PW-1:0] rd_addr [NR],
  output logic [PW-1:0] rd_data [NR],
  input  logic          wr_en   [NW],
  input  logic [PW-1:0] wr_addr [NW],
  input  logic [PW-1:0] wr_data [NW]
);
  logic [PW-1:0] next_ptr [1:F];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned l = 1; l <= F; l++)
        next_ptr[l] <= (l == F) ? '0 : PW'(l + 1);
    end else begin
      for (int unsigned w = 0; w < NW; w++)
        if (wr_en[w] && wr_addr[w] != '0 && wr_addr[w] <= PW'(F))
          next_ptr[wr_addr[w]] <= wr_data[w];
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < NR; p++)
      rd_data[p] = (rd_addr[p] == '0 || rd_addr[p] > PW'(F)) ? '0 : next_ptr[rd_addr[p]];
  end

  // Two ports must not write one location in the same cycle.
  always_ff @(posedge clk) begin
    if (!rst) begin
      for (int unsigned a = 0; a < NW; a++)
        for (int unsigned b = a + 1; b < NW; b++)
          assert (!(wr_en[a] && wr_en[b] && wr_addr[a] == wr_addr[b]))
            else $error("linked_list_memory: two writes to location %0d", wr_addr[a]);
    end
  end
endmodule
