// Ethernet core of the injector: frames IP packets for the 10GbE MAC.
//
// For each IP packet it takes the destination IP address (meta_valid/
// meta_ready) and puts a 14-byte Ethernet II header in front of the packet:
// destination MAC, source MAC cfg_src_mac, EtherType 0x0800. The destination
// MAC is cfg_dst_mac_prefix in its upper 24 bits and the low 24 bits of the
// destination IP address below, so the HLT nodes need no address resolution
// protocol. The frame leaves on the Avalon-ST transmit interface of the MAC
// without preamble or FCS, which the MAC adds together with the padding of
// short frames. The payload follows the header beat at one beat per cycle.
// The document keeps the Ethernet core in every configuration; the address
// mapping and the absence of ARP are this design's choices.
module eth_tx
  import injector_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] cfg_src_mac,
  input  logic [23:0] cfg_dst_mac_prefix,
  input  logic        meta_valid,
  output logic        meta_ready,
  input  logic [31:0] meta_dest_ip,
  input  logic        in_valid,
  output logic        in_ready,
  input  beat_t       in,
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out
);
  logic [111:0] hdr;
  assign hdr = {cfg_dst_mac_prefix, meta_dest_ip[23:0], cfg_src_mac, ETHERTYPE_IPV4};

  hdr_prepend #(.HDR_BYTES(ETH_HDR_BYTES)) u_prepend (
    .clk, .rst_n,
    .hdr_valid(meta_valid), .hdr_ready(meta_ready), .hdr,
    .in_valid, .in_ready, .in,
    .out_valid, .out_ready, .out
  );

endmodule
