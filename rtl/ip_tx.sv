// Send-only IPv4 core of the injector.
//
// Takes IP-sized pieces from the fragmentation module and sends each as one
// IPv4 packet. It does no fragmentation and receives nothing: the header of
// every packet is built from the piece's descriptor alone
//   version 4, IHL 5, TOS 0, total length = payload + 20, identification,
//   flags (MF), fragment offset, TTL 64, protocol 0xF2 (MEP), checksum,
//   source address cfg_src_ip (the address of the readout board it imitates),
//   destination address,
// with the checksum computed combinationally over the other nine header
// words. A hdr_prepend puts the 20 bytes in front of the payload. With each
// packet the destination is handed on (meta_valid/meta_ready) to the Ethernet
// core, which needs it for the MAC address. Descriptor, header and meta leave
// in the same cycle; the payload then flows one beat per cycle behind two
// header beats.
// Send-only operation, no fragmentation and the extra descriptor signals are
// as the document describes; field values such as TTL are this design's.
module ip_tx
  import injector_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] cfg_src_ip,
  input  logic        frag_valid,
  output logic        frag_ready,
  input  frag_desc_t  frag,
  input  logic        in_valid,
  output logic        in_ready,
  input  beat_t       in,
  output logic        meta_valid,
  input  logic        meta_ready,
  output logic [31:0] meta_dest_ip,
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out
);
  logic         hp_ready;
  logic [159:0] hdr, hdr0;

  always_comb begin
    hdr0 = {8'h45, 8'h00, frag.payload_len + 16'(IP_HDR_BYTES),
            frag.ident, {2'b00, frag.more_frags, frag.frag_off},
            IP_TTL, IP_PROTO_MEP, 16'h0000,
            cfg_src_ip, frag.dest_ip};
    hdr = hdr0;
    hdr[79:64] = ip_checksum(hdr0);
  end

  assign frag_ready   = hp_ready && meta_ready;
  assign meta_valid   = frag_valid && hp_ready;
  assign meta_dest_ip = frag.dest_ip;

  hdr_prepend #(.HDR_BYTES(IP_HDR_BYTES)) u_prepend (
    .clk, .rst_n,
    .hdr_valid(frag_valid && meta_ready), .hdr_ready(hp_ready), .hdr,
    .in_valid, .in_ready, .in,
    .out_valid, .out_ready, .out
  );

endmodule
