// Shared types and constants of the 10 Gigabit Ethernet data injector.
//
// The injector turns accepted triggers into Multi-Event Packets (MEP) carried
// over IPv4 over Ethernet. Every stage passes packets as a stream of 64-bit
// beats (beat_t) with a valid/ready handshake beside it: byte 0 of a beat is
// in bits 63:56 (network order), sop and eop mark the first and last beat of a
// packet and empty counts the unused bytes at the end of the eop beat, as on
// the Avalon-ST interface of the MAC. The header layouts below follow the
// usual LHCb MEP conventions and IPv4/Ethernet II; the field layout of the MEP
// header is this design's choice.
package injector_pkg;

  localparam int unsigned DATA_W = 64;   // datapath width: 64 bits at 156.25 MHz = 10 Gb/s

  // Header sizes in bytes.
  localparam int unsigned MEP_HDR_BYTES  = 12;  // event ID(32) packing factor(16) length(16) partition(32)
  localparam int unsigned FRAG_HDR_BYTES = 4;   // event ID low bits(16) fragment length(16)
  localparam int unsigned IP_HDR_BYTES   = 20;  // IPv4 header without options
  localparam int unsigned ETH_HDR_BYTES  = 14;  // Ethernet II header, FCS added by the MAC

  localparam logic [7:0]  IP_PROTO_MEP   = 8'hF2;     // IP protocol number carried by MEP
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IP_TTL         = 8'd64;

  // One beat of a packet stream.
  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic              sop;
    logic              eop;
    logic [2:0]        empty;   // unused bytes in the eop beat (0..7)
  } beat_t;

  // An accepted trigger: the event and the HLT node it must be sent to.
  typedef struct packed {
    logic [31:0] event_id;
    logic [31:0] dest_ip;
  } trigger_t;

  // Describes one MEP to the fragmentation module.
  typedef struct packed {
    logic [15:0] length;     // bytes of the whole MEP, header included
    logic [31:0] dest_ip;
  } mep_desc_t;

  // The header information of one IP fragment, handed from the fragmentation
  // module to the IP core so that all fragments of a MEP agree.
  typedef struct packed {
    logic [15:0] payload_len;  // bytes of this fragment's payload
    logic [12:0] frag_off;     // offset in 8-byte units
    logic        more_frags;   // MF flag
    logic [15:0] ident;        // IP identification, one per MEP
    logic [31:0] dest_ip;
  } frag_desc_t;

  // Ones' complement sum of the ten 16-bit words of an IPv4 header whose
  // checksum field is zero, complemented: the header checksum.
  function automatic logic [15:0] ip_checksum(input logic [159:0] hdr);
    logic [19:0] sum;
    sum = '0;
    for (int i = 0; i < 10; i++) sum += 20'(hdr[16*i +: 16]);
    sum = 20'(sum[15:0]) + 20'(sum[19:16]);
    sum = 20'(sum[15:0]) + 20'(sum[19:16]);
    return ~sum[15:0];
  endfunction

endpackage
