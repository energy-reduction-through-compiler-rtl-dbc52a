// cdr_model_pkg: reference models used by the testbenches. They are written
// from the behaviour described in the RTL headers, with plain integers and
// queues, and share no code with the RTL.
package cdr_model_pkg;

  localparam int unsigned M_CNT_MAX = (1 << 20) - 1;   // counter saturation

  // Function behaviour buffer: direct mapped, eight saturating counters
  // (0 cycles, 1 br_correct, 2 br_mispred, 3 dc_miss, 4 dc_hit, 5 ic_miss,
  // 6 ic_hit, 7 num_calls), sticky hot flag, clear empties it.
  class fbb_model;
    int unsigned entries;
    int unsigned hot_thresh;
    bit          valid[];
    bit          hot[];
    longint unsigned fid_of[];
    int unsigned cnt[][8];
    int unsigned replaces;
    int unsigned evictions;   // replacements of another function's live block

    function new(int unsigned n, int unsigned refresh_bits, int unsigned hot_shift);
      entries    = n;
      hot_thresh = 1 << (refresh_bits - hot_shift);
      valid      = new[n];
      hot        = new[n];
      fid_of     = new[n];
      cnt        = new[n];
      replaces   = 0;
      evictions  = 0;
      foreach (valid[i]) begin valid[i] = 0; hot[i] = 0; end
    endfunction

    // One clock cycle. ev[0..5] follow the counter order 1..6. Returns 1 if
    // the function becomes hot in this cycle.
    function bit step(longint unsigned fid, bit call_pulse, bit ev[6], bit clear);
      int unsigned i = int'(fid % entries);
      bit was_hot;
      step = 0;
      if (clear) begin
        foreach (valid[k]) begin valid[k] = 0; hot[k] = 0; end
        return 0;
      end
      if (!(valid[i] && fid_of[i] == fid)) begin
        replaces++;
        if (valid[i]) evictions++;
        valid[i] = 1; hot[i] = 0; fid_of[i] = fid;
        for (int k = 0; k < 8; k++) cnt[i][k] = 0;
      end
      was_hot = hot[i];
      if (cnt[i][0] < M_CNT_MAX) cnt[i][0]++;
      for (int k = 0; k < 6; k++) if (ev[k] && cnt[i][k+1] < M_CNT_MAX) cnt[i][k+1]++;
      if (call_pulse && cnt[i][7] < M_CNT_MAX) cnt[i][7]++;
      if (cnt[i][0] >= hot_thresh) hot[i] = 1;
      return hot[i] && !was_hot;
    endfunction
  endclass

  // Function ID stack: drops the oldest entry when full, ignores a pop when
  // empty.
  class stack_model;
    int unsigned     depth;
    longint unsigned q[$];
    function new(int unsigned d); depth = d; endfunction
    function bit push(longint unsigned v);   // returns 1 on overflow
      push = 0;
      if (q.size() == depth) begin void'(q.pop_front()); push = 1; end
      q.push_back(v);
    endfunction
    function bit pop(output longint unsigned v);
      if (q.size() == 0) return 0;
      v = q.pop_back();
      return 1;
    endfunction
  endclass

endpackage
