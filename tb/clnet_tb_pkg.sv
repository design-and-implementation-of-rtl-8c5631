// clnet_tb_pkg: packet builders shared by the testbenches.
//
// A data packet is built exactly as a host hands it to its interface card:
// a header control byte (PS set, router origin, SO set, IP/VCI and priority
// bits as asked), four destination bytes, the datagram bytes (a pattern seeded
// by 'seed') and a trailer control byte with PS clear. Control packets follow
// the ACTA format: header with CS, N_unreserved and N_reserved most
// significant byte first, trailer.
package clnet_tb_pkg;
  import clnet_pkg::*;

  typedef tbyte_t bq_t[$];

  function automatic tbyte_t hdr_byte(logic ps, logic ip, logic rsv);
    acb_t a;
    a = '{dt: 1'b0, ps: ps, hub: 1'b0, cs: 1'b0, so: 1'b1, ip: ip, nm: 1'b0, rsv: rsv, r0: 1'b0};
    return tbyte_t'(a);
  endfunction

  function automatic logic [7:0] pattern(int seed, int i);
    return 8'((seed * 37 + i * 11 + (i >> 3)) & 8'hff);
  endfunction

  function automatic bq_t make_pkt(logic ip, logic rsv, logic [31:0] dest, int seed, int len);
    bq_t q;
    q.push_back(hdr_byte(1'b1, ip, rsv));
    for (int i = 3; i >= 0; i--) q.push_back({1'b1, dest[8*i +: 8]});
    for (int i = 0; i < len; i++) q.push_back({1'b1, pattern(seed, i)});
    q.push_back(hdr_byte(1'b0, ip, rsv));
    return q;
  endfunction

  function automatic bq_t make_cp(logic [15:0] nu, logic [15:0] nr);
    bq_t q;
    q.push_back(cp_byte(1'b1));
    q.push_back({1'b1, nu[15:8]});
    q.push_back({1'b1, nu[7:0]});
    q.push_back({1'b1, nr[15:8]});
    q.push_back({1'b1, nr[7:0]});
    q.push_back(cp_byte(1'b0));
    return q;
  endfunction

  // The same packet as the router puts it on the ring (header/trailer re-marked).
  function automatic bq_t occupied(bq_t p);
    bq_t q;
    q = p;
    q[0]           = occupy(q[0]);
    q[q.size() - 1] = occupy(q[q.size() - 1]);
    return q;
  endfunction
endpackage
