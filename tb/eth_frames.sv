// eth_frames: testbench-only builder of GMII byte streams for Ethernet II /
// IPv4 / UDP or TCP frames, written from the protocol standards.
//
// build() returns preamble (7 x 0x55), SFD (0xd5), MAC addresses, EtherType,
// a 20-byte IPv4 header with its checksum (RFC 791 one's-complement sum),
// the UDP (8 bytes) or TCP (20 bytes) header, the payload, padding up to the
// 60-byte minimum and four FCS bytes (not a real CRC; the filter does not
// check it). Flags let a test break one field at a time.
package eth_frames;

  typedef byte unsigned bytes_t [$];

  typedef struct {
    bit  tcp;
    bit  bad_ethertype;
    bit  bad_checksum;
    bit  bad_version;
    bit  bad_udp_len;
    bit  fragment;
  } frame_opts_t;

  function automatic bytes_t build(string payload, frame_opts_t o);
    bytes_t f, ip;
    int l4_len, tot, sum;
    for (int i = 0; i < 7; i++) f.push_back(8'h55);
    f.push_back(8'hd5);
    for (int i = 0; i < 6; i++) f.push_back(8'h02 + byte'(i));          // dst
    for (int i = 0; i < 6; i++) f.push_back(8'h12 + byte'(i));          // src
    if (o.bad_ethertype) begin f.push_back(8'h08); f.push_back(8'h06); end   // ARP
    else                 begin f.push_back(8'h08); f.push_back(8'h00); end
    l4_len = (o.tcp ? 20 : 8) + payload.len();
    tot    = 20 + l4_len;
    ip = {};
    ip.push_back(o.bad_version ? 8'h65 : 8'h45);
    ip.push_back(8'h00);
    ip.push_back(byte'(tot >> 8)); ip.push_back(byte'(tot));
    ip.push_back(8'h12); ip.push_back(8'h34);                           // id
    ip.push_back(o.fragment ? 8'h20 : 8'h40); ip.push_back(8'h00);      // MF / DF
    ip.push_back(8'd64);
    ip.push_back(o.tcp ? 8'd6 : 8'd17);
    ip.push_back(8'h00); ip.push_back(8'h00);                           // checksum
    ip.push_back(8'd10); ip.push_back(8'd0); ip.push_back(8'd0); ip.push_back(8'd1);
    ip.push_back(8'd10); ip.push_back(8'd0); ip.push_back(8'd0); ip.push_back(8'd2);
    sum = 0;
    for (int i = 0; i < 20; i += 2) sum += {ip[i], ip[i+1]};
    while (sum >> 16) sum = (sum & 16'hffff) + (sum >> 16);
    sum = ~sum & 16'hffff;
    if (o.bad_checksum) sum ^= 16'h0100;
    ip[10] = byte'(sum >> 8); ip[11] = byte'(sum);
    foreach (ip[i]) f.push_back(ip[i]);
    f.push_back(8'h30); f.push_back(8'h39);                             // src port
    f.push_back(8'h30); f.push_back(8'h3a);                             // dst port
    if (o.tcp) begin
      for (int i = 0; i < 8; i++) f.push_back(byte'(i));                // seq, ack
      f.push_back(8'h50); f.push_back(8'h18);                           // doff 5, PSH ACK
      f.push_back(8'hff); f.push_back(8'hff);                           // window
      f.push_back(8'h00); f.push_back(8'h00); f.push_back(8'h00); f.push_back(8'h00);
    end else begin
      f.push_back(byte'((l4_len + (o.bad_udp_len ? 1 : 0)) >> 8));
      f.push_back(byte'(l4_len + (o.bad_udp_len ? 1 : 0)));
      f.push_back(8'h00); f.push_back(8'h00);                           // no checksum
    end
    for (int i = 0; i < payload.len(); i++) f.push_back(payload[i]);
    while (f.size() < 8 + 60) f.push_back(8'h00);                       // padding
    for (int i = 0; i < 4; i++) f.push_back(byte'($urandom()));         // FCS
    return f;
  endfunction

endpackage
