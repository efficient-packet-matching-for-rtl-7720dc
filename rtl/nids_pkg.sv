// nids_pkg: types and constants shared by the packet matching engines.
//
// The header engine works on the classic 5-tuple (source/destination IP,
// source/destination port, protocol) and on port range couples
// {SL, SH, DL, DH}, the rows of the Range List.  The field widths are the
// IPv4/TCP ones (32-bit addresses, 16-bit ports, 8-bit protocol).  The
// invalid range couple, used to fill Range List slots that hold no rule, is
// this design's choice: SL above SH can never be satisfied, so an RME fed
// with it always answers Y = 0.
package nids_pkg;

  // 5-tuple of a packet header, 104 bits (13 bytes).
  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [7:0]  proto;
  } header_t;

  localparam int unsigned HEADER_BITS = $bits(header_t);

  // One row of a Range List sub-table: source port range [SL, SH] and
  // destination port range [DL, DH], bounds included.
  typedef struct packed {
    logic [15:0] sl;
    logic [15:0] sh;
    logic [15:0] dl;
    logic [15:0] dh;
  } port_range_t;

  // Filler for a sub-table slot with no rule: matches no port value.
  localparam port_range_t RANGE_INVALID = '{sl: 16'hFFFF, sh: 16'h0000,
                                           dl: 16'hFFFF, dh: 16'h0000};

endpackage
