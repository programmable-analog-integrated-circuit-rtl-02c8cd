// toc_rom: table of content.
//
// A read-only table of one identification tag per module address, so that
// software can find, say, the differential comparator without knowing its
// address: at start-up it reads all 16 entries and keeps the address of each
// tag it needs. The tag codes and the order of the cells are this design's
// choice (see panic_pkg); addresses without a module read TAG_NONE.
// Combinational.
module toc_rom
  import panic_pkg::*;
#(
  parameter toc_t TAGS = PROTO_TOC
) (
  input  logic [3:0] addr,
  output tag_t       tag
);

  assign tag = TAGS[addr];

endmodule
