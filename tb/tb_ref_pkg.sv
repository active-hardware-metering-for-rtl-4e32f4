// tb_ref_pkg: reference model used by the testbenches, written from the
// published graphs as tables, independently of the RTL functions.
//
// It holds the original five-state FSM, the 3-bit added-STG module, one step
// of the whole added STG, and a breadth-first key search that plays the role
// of the design owner: from a read-out power-up state it finds the shortest
// input sequence that reaches the functional code while avoiding the trap
// edge into the black hole.
package tb_ref_pkg;

  // next module state, indexed [u][s]
  localparam int MOD_TBL [4][8] = '{
    '{2, 2, 3, 4, 5, 6, 7, 0},
    '{2, 2, 2, 4, 1, 6, 7, 3},
    '{0, 1, 2, 3, 4, 5, 6, 7},
    '{0, 1, 2, 3, 4, 5, 6, 7}};

  // original FSM, logical states 0..4: next index for x=0 and x=1
  localparam int ORIG_NEXT [5][2] = '{'{0, 4}, '{0, 1}, '{4, 0}, '{1, 2}, '{3, 4}};
  localparam int ORIG_CODE [5]    = '{0, 1, 2, 4, 7};
  localparam int DUMMY_CODE [3]   = '{3, 5, 6};
  localparam int MASKS [3]        = '{0, 5, 3};

  function automatic int code_idx(int c);
    for (int i = 0; i < 5; i++) if (ORIG_CODE[i] == c) return i;
    return -1;
  endfunction

  function automatic bit is_dummy(int c);
    return c == 3 || c == 5 || c == 6;
  endfunction

  // one step of the added STG with n modules and w input bits
  function automatic int unsigned add_step(int unsigned a, int unsigned x, int n, int w);
    int unsigned r;
    r = 0;
    for (int i = 0; i < n; i++) begin
      int s, prev, b0, b1, u;
      s    = int'((a >> (3 * i)) & 7);
      prev = int'((a >> (3 * ((i + n - 1) % n))) & 3);
      b0   = int'((x >> ((2 * i) % w)) & 1);
      b1   = int'((x >> ((2 * i + 1) % w)) & 1);
      u    = ((b1 * 2 + b0) ^ prev ^ (i % 4)) & 3;
      r    = r | (32'(MOD_TBL[u][s]) << (3 * i));
    end
    return r;
  endfunction

  function automatic bit is_trap(int unsigned a, int unsigned x, int n, int w);
    return (((a >> (3 * (n - 1))) & 7) == 6) && (x == (1 << w) - 1);
  endfunction

  // shortest key from a0 to the functional code 0; empty if a0 is 0
  function automatic void find_key(int unsigned a0, int n, int w, ref int unsigned key[$]);
    int unsigned N;
    int unsigned par[];
    int unsigned pin[];
    bit          seen[];
    int unsigned q[$];
    int unsigned v, nx;
    N    = 1 << (3 * n);
    par  = new[N];
    pin  = new[N];
    seen = new[N];
    key.delete();
    if (a0 == 0) return;
    seen[a0] = 1;
    q.push_back(a0);
    while (q.size() > 0) begin
      v = q.pop_front();
      for (int unsigned x = 0; x < (1 << w); x++) begin
        if (is_trap(v, x, n, w)) continue;
        nx = add_step(v, x, n, w);
        if (!seen[nx]) begin
          seen[nx] = 1;
          par[nx]  = v;
          pin[nx]  = x;
          if (nx == 0) begin
            v = 0;
            while (v != a0) begin
              key.push_front(pin[v]);
              v = par[v];
            end
            return;
          end
          q.push_back(nx);
        end
      end
    end
  endfunction

endpackage
