// can_ref_pkg: reference model used by the testbenches.
//
// Builds CAN base frames bit by bit, computes the CRC-15 by polynomial
// long division over the bit list, and stuffs a bit list, without sharing
// any code with the RTL.
package can_ref_pkg;

  typedef bit bitq_t [$];

  // CRC by long division: remainder of (bits * x^15) / (x^15+x^14+x^10+x^8+x^7+x^4+x^3+1)
  function automatic bit [14:0] ref_crc(bitq_t bits);
    bit poly [16] = '{1,1,0,0,0,1,0,1,1,0,0,1,1,0,0,1}; // x^15 .. x^0
    bit work [$];
    bit [14:0] r;
    work = bits;
    for (int i = 0; i < 15; i++) work.push_back(1'b0);
    for (int i = 0; i + 15 < work.size(); i++)
      if (work[i]) for (int j = 0; j < 16; j++) work[i+j] ^= poly[j];
    for (int i = 0; i < 15; i++) r[14-i] = work[work.size()-15+i];
    return r;
  endfunction

  // SOF .. end of data field, unstuffed
  function automatic bitq_t ref_frame(bit [10:0] id, bit rtr, bit [3:0] dlc, bit [7:0] data [8]);
    bitq_t q;
    int n;
    q.push_back(1'b0);
    for (int i = 10; i >= 0; i--) q.push_back(id[i]);
    q.push_back(rtr); q.push_back(1'b0); q.push_back(1'b0);
    for (int i = 3; i >= 0; i--) q.push_back(dlc[i]);
    n = rtr ? 0 : (dlc > 8 ? 8 : int'(dlc));
    for (int b = 0; b < n; b++) for (int i = 7; i >= 0; i--) q.push_back(data[b][i]);
    return q;
  endfunction

  function automatic bitq_t with_crc(bitq_t q);
    bit [14:0] c = ref_crc(q);
    bitq_t r = q;
    for (int i = 14; i >= 0; i--) r.push_back(c[i]);
    return r;
  endfunction

  // insert a complement after every five equal bits (a stuff bit starts a new run)
  function automatic bitq_t ref_stuff(bitq_t q, output int nstuff);
    bitq_t r;
    int run = 0;
    bit last = 1'b0;
    nstuff = 0;
    foreach (q[i]) begin
      if (run == 5) begin r.push_back(!last); last = !last; run = 1; nstuff++; end
      if (run > 0 && q[i] == last) run++; else run = 1;
      last = q[i];
      r.push_back(q[i]);
    end
    if (run == 5) begin r.push_back(!last); nstuff++; end
    return r;
  endfunction

  // complete frame as seen on the bus when acknowledged
  function automatic bitq_t ref_bus_frame(bit [10:0] id, bit rtr, bit [3:0] dlc, bit [7:0] data [8],
                                          output int nstuff);
    bitq_t r = ref_stuff(with_crc(ref_frame(id, rtr, dlc, data)), nstuff);
    r.push_back(1'b1);            // CRC delimiter
    r.push_back(1'b0);            // ACK slot, driven by receivers
    r.push_back(1'b1);            // ACK delimiter
    for (int i = 0; i < 7; i++) r.push_back(1'b1);  // EOF
    return r;
  endfunction

endpackage
