// Reference CABAC model used by the entropy-coding testbenches. It follows
// the bit-serial procedures of the H.264 standard (RenormE loop, PutBit with
// outstanding bits, bypass and terminate coding, flush) and its context
// initialisation and update rules; the probability tables come from
// cabac_pkg. Binarization follows the FL / U / TU / UEGk definitions with
// the context assignment of cabac_binarizer (ctx_base + min(binIdx,
// ctx_inc_max) for prefix bins, bypass for suffix and sign).
int     r_low, r_range, r_outs, r_first;
bit     r_bits [$];                 // produced stream bits
logic [5:0] r_state [1024];
logic       r_mps [1024];
typedef struct { int val; int kind; int ctx; int last; } rbin_t;

task automatic r_reset();
  r_low = 0; r_range = 510; r_outs = 0; r_first = 1;
endtask
task automatic r_put(int b);
  if (r_first) r_first = 0; else r_bits.push_back(b[0]);
  while (r_outs > 0) begin r_bits.push_back(!b[0]); r_outs--; end
endtask
task automatic r_renorm();
  while (r_range < 256) begin
    if (r_low < 256) r_put(0);
    else if (r_low >= 512) begin r_low -= 512; r_put(1); end
    else begin r_low -= 256; r_outs++; end
    r_range <<= 1; r_low <<= 1;
  end
endtask
task automatic r_decision_st(int b, ref logic [5:0] st, ref logic mps);
  int lps = int'(cabac_pkg::range_lps(st, 2'((r_range >> 6) & 3)));
  r_range -= lps;
  if (b != int'(mps)) begin
    r_low += r_range; r_range = lps;
    if (st == 0) mps = !mps;
    st = cabac_pkg::trans_lps(st);
  end else st = cabac_pkg::trans_mps(st);
  r_renorm();
endtask
task automatic r_decision_ctx(int b, int c);
  logic [5:0] st = r_state[c];
  logic mps = r_mps[c];
  r_decision_st(b, st, mps);
  r_state[c] = st; r_mps[c] = mps;
endtask
task automatic r_bypass(int b);
  r_low <<= 1;
  if (b) r_low += r_range;
  if (r_low >= 1024) begin r_put(1); r_low -= 1024; end
  else if (r_low < 512) r_put(0);
  else begin r_low -= 512; r_outs++; end
endtask
task automatic r_terminate(int b);
  r_range -= 2;
  if (b) begin
    r_low += r_range;
    r_range = 2; r_renorm();
    r_put((r_low >> 9) & 1);
    r_bits.push_back((r_low >> 8) & 1); r_bits.push_back(1'b1);
  end else r_renorm();
endtask
// byte-align after the last bin of a slice and restart the coder
task automatic r_pad();
  while (r_bits.size() % 8 != 0) r_bits.push_back(1'b0);
  r_reset();
endtask
task automatic r_code(rbin_t b);
  case (b.kind)
    0: r_decision_ctx(b.val, b.ctx);
    1: r_bypass(b.val);
    default: r_terminate(b.val);
  endcase
  if (b.last) r_pad();
endtask
task automatic r_ctx_init(int idx, int m, int n, int qp);
  int pre = ((m * qp) >>> 4) + n;
  pre = pre < 1 ? 1 : (pre > 126 ? 126 : pre);
  if (pre <= 63) begin r_state[idx] = 6'(63 - pre); r_mps[idx] = 1'b0; end
  else begin r_state[idx] = 6'(pre - 64); r_mps[idx] = 1'b1; end
endtask
// binarization of one syntax element into bins
task automatic r_binarize(int typ, int v, int prm, int k, int sgn, int base, int incmax, int last,
                          ref rbin_t q [$]);
  int n0 = q.size();
  rbin_t b;
  int a = v < 0 ? -v : v;
  case (typ)
    0: for (int i = 0; i < prm; i++) begin b = '{(v >> i) & 1, 0, base + (i < incmax ? i : incmax), 0}; q.push_back(b); end
    1: begin
         for (int i = 0; i < a; i++) begin b = '{1, 0, base + (i < incmax ? i : incmax), 0}; q.push_back(b); end
         b = '{0, 0, base + (a < incmax ? a : incmax), 0}; q.push_back(b);
       end
    2: begin
         for (int i = 0; i < (a < prm ? a : prm); i++) begin b = '{1, 0, base + (i < incmax ? i : incmax), 0}; q.push_back(b); end
         if (a < prm) begin b = '{0, 0, base + (a < incmax ? a : incmax), 0}; q.push_back(b); end
       end
    3: begin
         automatic int pre = a < prm ? a : prm;
         for (int i = 0; i < pre; i++) begin b = '{1, 0, base + (i < incmax ? i : incmax), 0}; q.push_back(b); end
         if (a < prm) begin b = '{0, 0, base + (a < incmax ? a : incmax), 0}; q.push_back(b); end
         else begin
           automatic int s = a - prm, kk = k;
           forever begin
             if (s >= (1 << kk)) begin b = '{1, 1, 0, 0}; q.push_back(b); s -= 1 << kk; kk++; end
             else begin
               b = '{0, 1, 0, 0}; q.push_back(b);
               while (kk > 0) begin kk--; b = '{(s >> kk) & 1, 1, 0, 0}; q.push_back(b); end
               break;
             end
           end
         end
         if (sgn && v != 0) begin b = '{v < 0, 1, 0, 0}; q.push_back(b); end
       end
    default: begin b = '{v & 1, 2, 0, 0}; q.push_back(b); end
  endcase
  if (last && q.size() > n0) q[q.size()-1].last = 1;
endtask
