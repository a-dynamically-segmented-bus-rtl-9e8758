// Reference model of the DS-Bus resolution algorithm, used by the
// testbenches: given the pending requests and the scan start it returns the
// granted set and the switch setting, written directly from the rules of the
// algorithm (first requester from the start, then repeatedly the first
// pending request, in ring order from the start, whose section fits in the
// free arc between the right and the left boundary of the granted section).
package dsb_ref_pkg;

  function automatic int ccw(int a, int b, int n);
    return ((b - a) % n + n) % n;
  endfunction

  // req_* arrays are indexed by PE. Returns the number of grants.
  function automatic int resolve(input int n, input int s,
                                 input bit req_v[], input int req_l[], input int req_r[],
                                 output bit gnt[], output bit sw[]);
    int lb, rb, cnt, pick;
    gnt = new[n];
    sw  = new[n];
    cnt = 0;
    pick = -1;
    for (int k = 0; k < n; k++)
      if (pick < 0 && req_v[(s + k) % n]) pick = (s + k) % n;
    if (pick < 0) return 0;
    lb = req_l[pick];
    while (pick >= 0) begin
      gnt[pick] = 1'b1;
      cnt++;
      rb = req_r[pick];
      for (int id = 0; id < n; id++)
        if (ccw(req_l[pick], id, n) < ccw(req_l[pick], req_r[pick], n)) sw[id] = 1'b1;
      pick = -1;
      for (int k = 0; k < n; k++) begin
        int p;
        p = (s + k) % n;
        if (pick < 0 && req_v[p] && !gnt[p] &&
            ccw((rb + 1) % n, req_l[p], n) + ccw(req_l[p], req_r[p], n) + 1
              <= ccw((rb + 1) % n, lb, n))
          pick = p;
      end
    end
    return cnt;
  endfunction

endpackage
