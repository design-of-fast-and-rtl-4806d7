// data_memory: the cell buffer of one input port.
//
// Holds F cells of W bits at locations 1..F (the same numbering as the
// linked-list memory; location 0 is the NULL pointer and holds nothing).
// One write port stores an arriving cell at the location the queue manager
// took from the empty list; one read port fetches a departing cell.
// Both ports are synchronous: a write lands at the clock edge, and a read
// issued with rd_en returns its cell on rd_data in the next cycle, with
// rd_valid high. A read and a write to one location in one cycle return
// the old cell. Dual-port operation (an arrival and a departure in the same
// slot) is this implementation's choice; the published scheduler's memory is
// a single-port RAM with chip-select, write- and output-enable. The size
// (16 cells of 8 bits) follows the published simulation.
module data_memory #(
  parameter int unsigned F = router_pkg::FRAME,
  parameter int unsigned W = router_pkg::CELL_W,
  localparam int unsigned PW = router_pkg::ptr_width(F)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_en,
  input  logic [PW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [PW-1:0] rd_addr,
  output logic          rd_valid,
  output logic [W-1:0]  rd_data
);
  logic [W-1:0] mem [1:F];

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr != '0 && wr_addr <= PW'(F))
      mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en && rd_addr != '0 && rd_addr <= PW'(F))
      rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) rd_valid <= 1'b0;
    else     rd_valid <= rd_en;
  end
endmodule
