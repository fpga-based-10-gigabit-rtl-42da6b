// Reference model of the injector's packet formats, for the testbenches.
// Worked out from the format descriptions alone: event lengths and bodies of
// the dummy event source, MEP layout, IPv4 header with its checksum and the
// Ethernet II header, all as byte queues in network order.
package tb_model_pkg;
  typedef byte unsigned bytes_t[$];

  function automatic int ev_len(input int unsigned id, input int base, input int mask);
    longint unsigned h = (longint'(id) * 64'h9E3779B1) & 64'hFFFF_FFFF;
    int l = base + 4 * int'((h >> 16) & mask);
    l = l - (l % 4);
    if (l > 65496) l = 65496;
    if (l < 4) l = 4;
    return l;
  endfunction

  function automatic void put(ref bytes_t q, input longint unsigned v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(8'(v >> (8 * i)));
  endfunction

  // body byte k of event id: words {id, 16'h0, 16'(offset)}
  function automatic void put_body(ref bytes_t q, input int unsigned id, input int len);
    for (int off = 0; off < len; off += 8) begin
      bytes_t w;
      put(w, {32'(id), 16'h0, 16'(off)}, 8);
      for (int b = 0; b < 8 && off + b < len; b++) q.push_back(w[b]);
    end
  endfunction

  // A whole MEP for the given event IDs.
  function automatic bytes_t mep(input int unsigned ids[$], input int base, input int mask,
                                 input int unsigned partition);
    bytes_t q;
    int total = 12;
    foreach (ids[i]) total += 4 + ev_len(ids[i], base, mask);
    put(q, ids[0], 4);
    put(q, ids.size(), 2);
    put(q, total, 2);
    put(q, partition, 4);
    foreach (ids[i]) begin
      int l = ev_len(ids[i], base, mask);
      put(q, ids[i] & 16'hFFFF, 2);
      put(q, l, 2);
      put_body(q, ids[i], l);
    end
    return q;
  endfunction

  function automatic bytes_t ip_hdr(input int payload_len, input int ident, input bit mf,
                                    input int off8, input int unsigned src, input int unsigned dst);
    bytes_t q;
    int unsigned sum = 0;
    put(q, 16'h4500, 2);
    put(q, payload_len + 20, 2);
    put(q, ident, 2);
    put(q, {2'b00, mf, 13'(off8)}, 2);
    put(q, 16'h40F2, 2);   // TTL 64, protocol 0xF2
    put(q, 0, 2);
    put(q, src, 4);
    put(q, dst, 4);
    for (int i = 0; i < 20; i += 2) sum += {q[i], q[i+1]};
    while (sum > 16'hFFFF) sum = (sum & 16'hFFFF) + (sum >> 16);
    sum = ~sum & 16'hFFFF;
    q[10] = 8'(sum >> 8);
    q[11] = 8'(sum);
    return q;
  endfunction

  function automatic bytes_t eth_hdr(input longint unsigned dst_mac, input longint unsigned src_mac);
    bytes_t q;
    put(q, dst_mac, 6);
    put(q, src_mac, 6);
    put(q, 16'h0800, 2);
    return q;
  endfunction
endpackage
