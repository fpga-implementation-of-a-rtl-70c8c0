// art: Address Region Table of one tile.
//
// Every processor access is classified as cacheable (DRAM), local scratchpad,
// remote scratchpad or tag access, and gets an access-rights verdict. The
// prototype replaces a programmable table with a static, hard-wired map in
// which each L2 data and tag array has its own physical address with the node
// and way in the upper bits; this module is that static map. The bit fields
// of the map are this design's choice (see ccsp_pkg). Purely combinational:
// it sits in parallel with the L1 tag lookup, and copies of it are used by the
// NI to decide whether an address is local or needs a packet.
module art
  import ccsp_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE_ID = '0
) (
  input  logic [31:0]       addr,
  output acc_class_e        cls,
  output logic              local_node, // address lies in this tile's L2
  output logic [PORT_W-1:0] port,       // crossbar port that owns the address
  output logic              perm_ok
);
  always_comb begin
    local_node = (addr[31:28] == RGN_DATA || addr[31:28] == RGN_TAG) &&
                 addr_node(addr) == NODE_ID;
    port = addr_port(addr);
    unique case (addr[31:28])
      RGN_DRAM: cls = AC_CACHEABLE;
      RGN_DATA: cls = local_node ? AC_SCRATCH : AC_REMOTE;
      RGN_TAG:  cls = local_node ? AC_TAG : AC_FAULT;   // remote tags are not reachable
      default:  cls = AC_FAULT;
    endcase
    perm_ok = (cls != AC_FAULT);
  end
endmodule
