// router_pkg: constants shared by the input-buffered router scheduler.
//
// The scheduler works in time slots of one clock cycle, grouped into frames
// of FRAME slots. Cell buffers hold FRAME cells, so a buffer location is
// addressed by a pointer in 1..FRAME and the pointer value 0 means NULL,
// as in the published linked-list scheme. Defaults: 8 output ports and
// 16-location memories with 8-bit cells, the sizes of the published
// simulations; the widths of the packet header and route table are this
// implementation's own choice.
package router_pkg;

  // Number of router ports (inputs = outputs); a power of two, at least 2.
  localparam int unsigned N_PORTS = 8;
  // Frame length F in slots; also the number of cells one input buffers.
  localparam int unsigned FRAME = 16;
  // Width of one cell in bits.
  localparam int unsigned CELL_W = 8;
  // Largest packet, in cells.
  localparam int unsigned MAX_CELLS = 16;
  // Destination address width (IPv4).
  localparam int unsigned DST_W = 32;
  // The route table is indexed by the low RT_AW bits of the destination.
  localparam int unsigned RT_AW = 4;

  // Width of a buffer pointer that can hold 0 (NULL) and 1..f.
  function automatic int unsigned ptr_width(input int unsigned f);
    return $clog2(f + 1);
  endfunction

endpackage
