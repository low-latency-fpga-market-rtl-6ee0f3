// itch_tb_pkg -- test helpers: builders for the six ITCH 5.0 order messages
// (big-endian fields at their specification offsets), the 0x00 + length
// framing used on the serial link, and a reference order book (orders by
// reference, aggregates per symbol and penny) computed independently of the
// RTL.
package itch_tb_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic void put(ref bytes_t q, input int unsigned off,
                              input longint unsigned v, input int n);
    for (int i = 0; i < n; i++) q[off + i] = 8'(v >> (8 * (n - 1 - i)));
  endfunction

  function automatic bytes_t blank(input byte unsigned t, input int len,
                                   input int unsigned locate);
    bytes_t q;
    for (int i = 0; i < len; i++) q.push_back(8'($urandom));  // don't-care fields
    q[0] = t;
    put(q, 1, locate, 2);
    return q;
  endfunction

  // stock: 8 characters, space padded
  // mpid = 1 builds the 'F' form: the same fields plus a 4-byte attribution
  function automatic bytes_t msg_add(input longint unsigned ref_no, input bit sell,
                                     input int unsigned shares, input string stock,
                                     input int unsigned price, input int unsigned locate = 7,
                                     input bit mpid = 0);
    bytes_t q = mpid ? blank(8'h46, 40, locate) : blank(8'h41, 36, locate);
    put(q, 11, ref_no, 8);
    q[19] = sell ? 8'h53 : 8'h42;
    put(q, 20, shares, 4);
    for (int i = 0; i < 8; i++) q[24 + i] = (i < stock.len()) ? stock[i] : 8'h20;
    put(q, 32, price, 4);
    return q;
  endfunction

  function automatic bytes_t msg_delete(input longint unsigned ref_no);
    bytes_t q = blank(8'h44, 19, 7);
    put(q, 11, ref_no, 8);
    return q;
  endfunction

  function automatic bytes_t msg_replace(input longint unsigned old_ref, new_ref,
                                         input int unsigned shares, price);
    bytes_t q = blank(8'h55, 35, 7);
    put(q, 11, old_ref, 8);
    put(q, 19, new_ref, 8);
    put(q, 27, shares, 4);
    put(q, 31, price, 4);
    return q;
  endfunction

  function automatic bytes_t msg_exec(input longint unsigned ref_no, input int unsigned shares);
    bytes_t q = blank(8'h45, 31, 7);
    put(q, 11, ref_no, 8);
    put(q, 19, shares, 4);
    return q;
  endfunction

  function automatic bytes_t msg_exec_px(input longint unsigned ref_no, input int unsigned shares,
                                         input int unsigned price);
    bytes_t q = blank(8'h43, 36, 7);
    put(q, 11, ref_no, 8);
    put(q, 19, shares, 4);
    put(q, 32, price, 4);
    return q;
  endfunction

  function automatic bytes_t msg_cancel(input longint unsigned ref_no, input int unsigned shares);
    bytes_t q = blank(8'h58, 23, 7);
    put(q, 11, ref_no, 8);
    put(q, 19, shares, 4);
    return q;
  endfunction

  // 0x00, 16-bit big-endian length, message
  function automatic bytes_t frame(input bytes_t m);
    bytes_t q;
    q.push_back(8'h00);
    q.push_back(8'(m.size() >> 8));
    q.push_back(8'(m.size()));
    foreach (m[i]) q.push_back(m[i]);
    return q;
  endfunction

  // STOCK_FILTER word pair of a name: character 0 in bits [7:0]
  function automatic logic [63:0] filter_word(input string stock);
    logic [63:0] w = '0;
    for (int i = 0; i < 8 && i < stock.len(); i++) w[8*i +: 8] = stock[i];
    return w;
  endfunction

  // ---------------------------------------------------------------- model
  class book_model;
    typedef struct {int unsigned price; int unsigned qty; bit side; int sym;} order_t;
    order_t      orders[longint unsigned];
    longint      agg   [int];    // key: sym*4096 + penny offset
    int          cnt   [int];
    int          base  [4];
    bit          based [4];
    int          n_win_err = 0;

    function int key(int sym, int off);
      return sym * 4096 + off;
    endfunction

    function int off_of(int sym, int unsigned price);
      return int'(price / 100) - base[sym];
    endfunction

    function void level(int sym, int off, longint dq, int dc);
      int k = key(sym, off);
      if (!agg.exists(k)) begin agg[k] = 0; cnt[k] = 0; end
      agg[k] += dq;
      cnt[k] += dc;
      if (cnt[k] == 0) agg[k] = 0;
    endfunction

    function bit in_win(int sym, int unsigned price);
      int p = int'(price / 100);
      int b = based[sym] ? base[sym] : ((p >= 1024) ? p - 1024 : 0);
      return price < 32'h0100_0000 && p >= b && p - b < 2048;
    endfunction

    function void add(longint unsigned r, int sym, bit side, int unsigned qty, int unsigned price);
      if (!in_win(sym, price)) begin n_win_err++; return; end
      if (!based[sym]) begin
        int p = int'(price / 100);
        base[sym]  = (p >= 1024) ? p - 1024 : 0;
        based[sym] = 1;
      end
      orders[r] = '{price, qty, side, sym};
      level(sym, off_of(sym, price), qty, 1);
    endfunction

    function void reduce(longint unsigned r, int unsigned n);
      order_t o;
      int unsigned d;
      if (!orders.exists(r)) return;
      o = orders[r];
      d = (n >= o.qty) ? o.qty : n;
      if (d == o.qty) begin
        orders.delete(r);
        level(o.sym, off_of(o.sym, o.price), -longint'(d), -1);
      end else begin
        orders[r].qty = o.qty - d;
        level(o.sym, off_of(o.sym, o.price), -longint'(d), 0);
      end
    endfunction

    function void del(longint unsigned r);
      if (orders.exists(r)) reduce(r, orders[r].qty);
    endfunction

    function void replace(longint unsigned r, longint unsigned nr, int unsigned qty, int unsigned price);
      order_t o;
      if (!orders.exists(r)) return;
      o = orders[r];
      del(r);
      add(nr, o.sym, o.side, qty, price);
    endfunction

    // best level of a side: -1 if empty. Sides are kept apart by price in
    // the tests (bids below asks), as the hardware assumes.
    function int best(int sym, bit side);
      int b = -1;
      foreach (orders[r]) begin
        if (orders[r].sym == sym && orders[r].side == side) begin
          int o = off_of(sym, orders[r].price);
          if (b < 0 || (!side && o > b) || (side && o < b)) b = o;
        end
      end
      return b;
    endfunction

    function longint qty_at(int sym, int off);
      int k = key(sym, off);
      return agg.exists(k) ? agg[k] : 0;
    endfunction

    function int depth(int sym, bit side);
      int seen[int];
      foreach (orders[r])
        if (orders[r].sym == sym && orders[r].side == side)
          seen[off_of(sym, orders[r].price)] = 1;
      return seen.num();
    endfunction
  endclass

endpackage
