// switch_model_pkg: reference model of one frame of the dual-exchange
// switch, used by the system testbenches. Written from the switching rules,
// not from the RTL: each outlet of each exchange keeps the first enabled
// caller (inlet order) whose I bit and D field point at it, the called
// exchange's own caller winning a same-inlet-slot tie; the call is
// delivered only if the called subscriber is disabled.
package switch_model_pkg;
  import switch_pkg::*;

  typedef struct {
    opcode_t out    [N_EXCH][N_USERS];
    logic    called [N_EXCH][N_USERS];
    user_t   cid    [N_EXCH][N_USERS];
    // statistics of the frame
    int      inter_calls, intra_calls, caller_off, called_busy, contended;
  } frame_result_t;

  function automatic frame_result_t run_frame(input opcode_t in [N_EXCH][N_USERS]);
    frame_result_t r;
    bit   claimed [N_EXCH][N_USERS];
    int   from_x  [N_EXCH][N_USERS];
    int   from_k  [N_EXCH][N_USERS];
    r.inter_calls = 0; r.intra_calls = 0; r.caller_off = 0; r.called_busy = 0; r.contended = 0;
    for (int t = 0; t < N_EXCH; t++)
      for (int u = 0; u < N_USERS; u++) begin claimed[t][u] = 0; from_x[t][u] = 0; from_k[t][u] = 0; end
    // scan: slot k of both exchanges at once
    for (int k = 0; k < N_USERS; k++) begin
      for (int t = 0; t < N_EXCH; t++) begin
        bit taken_now [N_USERS];
        for (int u = 0; u < N_USERS; u++) taken_now[u] = 0;
        // the called exchange's own caller first
        for (int n = 0; n < N_EXCH; n++) begin
          int x = (n == 0) ? t : 1 - t;
          opcode_t w = in[x][k];
          int tgt = w.inter ? 1 - x : x;
          if (tgt != t) continue;
          if (!w.en) continue;
          if (claimed[t][w.dst] && !taken_now[w.dst]) begin r.contended++; continue; end
          if (taken_now[w.dst]) begin r.contended++; continue; end
          claimed[t][w.dst] = 1; taken_now[w.dst] = 1;
          from_x[t][w.dst] = x; from_k[t][w.dst] = k;
        end
      end
      for (int x = 0; x < N_EXCH; x++) if (!in[x][k].en) r.caller_off++;
    end
    // read: outlet j of each exchange
    for (int y = 0; y < N_EXCH; y++)
      for (int j = 0; j < N_USERS; j++) begin
        opcode_t o = '0;
        o.dst = user_t'(j);
        if (claimed[y][j] && !in[y][j].en) begin
          opcode_t c = in[from_x[y][j]][from_k[y][j]];
          o.en = 1'b0;
          o.inter = (from_x[y][j] != y);
          o.src = c.src;
          o.data = c.data;
          r.called[y][j] = 1;
          r.cid[y][j] = c.src;
          if (o.inter) r.inter_calls++; else r.intra_calls++;
        end else begin
          o.en = in[y][j].en;
          o.src = in[y][j].src;
          o.data = in[y][j].data;
          r.called[y][j] = 0;
          r.cid[y][j] = '0;
          if (claimed[y][j]) r.called_busy++;
        end
        r.out[y][j] = o;
      end
    return r;
  endfunction

  // an opcode built field by field
  function automatic opcode_t make_op(bit en, bit inter, int src, int dst, logic [15:0] data);
    opcode_t w;
    w.en = en; w.inter = inter; w.dst = user_t'(dst); w.src = user_t'(src);
    w.zero = '0; w.data = data;
    return w;
  endfunction
endpackage
