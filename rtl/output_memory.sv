// output_memory: the schedule of one input for the coming frame.
//
// One entry per slot of the frame (F entries). Entry t holds whether the
// input sends a cell in slot t and to which output. In every slot the
// entry of the current slot is read (rd_valid/rd_port, combinational) to
// drive that slot's departure, and at the clock edge it is overwritten by
// the schedule just computed for the same slot of the next frame (wr_en,
// wr_valid, wr_port). A scheduled cell is thus read exactly one frame after
// the slot in which the output selector picked it. The published scheduler
// only names this memory; its layout and the one-frame delay are this
// implementation's choice.
// Reset clears every entry.
module output_memory #(
  parameter int unsigned F = router_pkg::FRAME,
  parameter int unsigned N = router_pkg::N_PORTS,
  localparam int unsigned SW = (F > 1) ? $clog2(F) : 1,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [SW-1:0] slot,
  output logic          rd_valid,
  output logic [NW-1:0] rd_port,
  input  logic          wr_en,
  input  logic          wr_valid,
  input  logic [NW-1:0] wr_port
);
  logic          ent_valid [F];
  logic [NW-1:0] ent_port  [F];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned t = 0; t < F; t++) begin
        ent_valid[t] <= 1'b0;
        ent_port[t]  <= '0;
      end
    end else if (wr_en) begin
      ent_valid[slot] <= wr_valid;
      ent_port[slot]  <= wr_port;
    end
  end

  assign rd_valid = ent_valid[slot];
  assign rd_port  = ent_port[slot];
endmodule
