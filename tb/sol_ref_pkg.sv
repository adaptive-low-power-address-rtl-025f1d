// sol_ref_pkg: reference models used by the testbenches.
//
// These model the coding schemes the straightforward way, as explicit lists
// that are searched and rearranged, which is deliberately different from the
// register-per-symbol hardware: sol_list_model keeps the list of symbols and
// moves or swaps entries. bus_model codes a whole bus: W-bit slices with
// list coding and optional transition signaling, optionally preceded by a
// Delta-TS or INC-XOR coder on the low bits (multiplexed bus). Separate
// objects model the sending and the receiving side.
package sol_ref_pkg;

  class sol_list_model;
    int unsigned n;
    bit          tr;
    int unsigned list[];

    function new(int unsigned w, bit is_tr);
      n    = 1 << w;
      tr   = is_tr;
      list = new[n];
      foreach (list[i]) list[i] = i;
    endfunction

    function int unsigned index_of(int unsigned sym);
      foreach (list[i]) if (list[i] == sym) return i;
      $fatal(1, "symbol %0d not in list", sym);
      return 0;
    endfunction

    function void reorganize(int unsigned idx);
      int unsigned s;
      s = list[idx];
      if (!tr) begin
        for (int unsigned k = idx; k > 0; k--) list[k] = list[k-1];
        list[0] = s;
      end else if (idx > 0) begin
        list[idx]   = list[idx-1];
        list[idx-1] = s;
      end
    endfunction

    function int unsigned encode(int unsigned sym);
      int unsigned idx;
      idx = index_of(sym);
      reorganize(idx);
      return idx;
    endfunction

    function int unsigned decode(int unsigned code);
      int unsigned s;
      s = list[code];
      reorganize(code);
      return s;
    endfunction
  endclass

  // lsb: 0 = none (plain data bus), 1 = Delta-TS, 2 = INC-XOR
  class bus_model;
    int unsigned   addr_w, w, lsb_w, lsb, stride;
    bit            ts;
    sol_list_model sl[];
    longint unsigned bus_prev;   // previous value on the lines
    longint unsigned addr_prev;  // previous address (low bits used)
    // counters of what happened, for the testbenches
    int unsigned   n_front, n_moved, n_seq, n_nonseq;

    function new(int unsigned aw, int unsigned sw, bit is_tr, bit use_ts,
                 int unsigned lsb_kind = 0, int unsigned lw = 0, int unsigned strd = 1);
      int unsigned ns, lo;
      addr_w = aw; w = sw; ts = use_ts; lsb = lsb_kind;
      lsb_w  = (lsb_kind == 0) ? 0 : lw;
      stride = strd;
      ns = (addr_w - lsb_w + w - 1) / w;
      sl = new[ns];
      for (int unsigned s = 0; s < ns; s++) begin
        lo = lsb_w + s * w;
        sl[s] = new(((addr_w - lo) < w) ? (addr_w - lo) : w, is_tr);
      end
      bus_prev = 0; addr_prev = 0;
    endfunction

    function int unsigned sw_of(int unsigned s);
      int unsigned lo = lsb_w + s * w;
      return ((addr_w - lo) < w) ? (addr_w - lo) : w;
    endfunction

    function longint unsigned encode(longint unsigned addr);
      longint unsigned out = 0, lmask, pred, a, b;
      int unsigned lo, c, sw;
      if (lsb != 0) begin
        lmask = (64'd1 << lsb_w) - 1;
        a     = addr & lmask;
        pred  = (addr_prev + 64'(stride)) & lmask;
        if (a == pred) n_seq++; else n_nonseq++;
        if (lsb == 1) b = ((a - pred) & lmask) ^ (bus_prev & lmask);
        else          b = a ^ pred;
        out = b;
        addr_prev = a;
      end
      foreach (sl[s]) begin
        lo = lsb_w + s * w;
        sw = sw_of(s);
        c  = sl[s].encode(32'((addr >> lo) & ((64'd1 << sw) - 1)));
        if (c == 0) n_front++; else n_moved++;
        if (ts) c = c ^ 32'((bus_prev >> lo) & ((64'd1 << sw) - 1));
        out |= longint'(c) << lo;
      end
      bus_prev = out;
      return out;
    endfunction

    function longint unsigned decode(longint unsigned bus);
      longint unsigned out = 0, lmask, pred, a, d;
      int unsigned lo, c, sw;
      if (lsb != 0) begin
        lmask = (64'd1 << lsb_w) - 1;
        pred  = (addr_prev + 64'(stride)) & lmask;
        if (lsb == 1) begin
          d = (bus ^ bus_prev) & lmask;
          a = (d + pred) & lmask;
        end else begin
          a = (bus ^ pred) & lmask;
        end
        out = a;
        addr_prev = a;
      end
      foreach (sl[s]) begin
        lo = lsb_w + s * w;
        sw = sw_of(s);
        c  = 32'((bus >> lo) & ((64'd1 << sw) - 1));
        if (ts) c = c ^ 32'((bus_prev >> lo) & ((64'd1 << sw) - 1));
        out |= longint'(sl[s].decode(c)) << lo;
      end
      bus_prev = bus;
      return out;
    endfunction
  endclass

  function automatic int unsigned popcount64(longint unsigned v);
    int unsigned n = 0;
    for (int i = 0; i < 64; i++) n += int'(v[i]);
    return n;
  endfunction

endpackage
