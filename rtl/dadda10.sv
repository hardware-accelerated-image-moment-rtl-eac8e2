// dadda10: unsigned N x N Dadda multiplier (N = 10 by default).
//
// The N*N partial-product bits a[i]&b[j] form a parallelogram of columns
// (column c holds the bits of weight 2^c). Dadda reduction then lowers the
// column heights stage by stage to the targets 9, 6, 4, 3, 2 (each target is
// the previous one times 1.5, rounded down, counted up from 2). In every stage
// a column gets just enough full adders (3 bits -> 1) and at most one half
// adder (2 bits -> 1) that, counting the carries arriving from the column
// below, it ends at the target height. A final ripple-carry adder sums the
// two rows left. The reduction schedule (how many adders per stage and column)
// is computed once at elaboration by the function schedule(); the wiring is
// generated from it. Structure follows the document; the adder placement rule is the
// standard Dadda one. Combinational, product width 2N.
module dadda10 #(
  parameter int unsigned N = 10
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int PW = 2 * N;

  // Dadda height targets d(1)=2, d(j+1)=floor(1.5*d(j)); stages use those < N.
  function automatic int num_stages();
    int d = 2, n = 0;
    while (d < N) begin
      n++;
      d = (d * 3) / 2;
    end
    return n;
  endfunction
  localparam int NST = num_stages();


  // Reduction schedule, computed once: for stage s and column c, the height
  // entering the stage and the numbers of full and half adders, 8 bits each,
  // packed at TAB[((s*PW + c)*3 + kind)*8 +: 8] (kind 0 height, 1 FA, 2 HA).
  localparam int TW = 8 * 3 * PW * (NST + 1);

  function automatic logic [TW-1:0] schedule();
    logic [TW-1:0] t = '0;
    int h [PW];
    int f [PW];
    int ha [PW];
    int d, e, cin_k;
    for (int k = 0; k < PW; k++) h[k] = (k < N) ? k + 1 : PW - 1 - k;
    for (int st = 0; st <= NST; st++) begin
      d = 2;  // target of stage st: d(NST-st) in the Dadda sequence
      for (int k = 0; k < NST - 1 - st; k++) d = (d * 3) / 2;
      for (int k = 0; k < PW; k++) begin
        cin_k   = (k > 0) ? f[k-1] + ha[k-1] : 0;
        e     = h[k] + cin_k - d;
        f[k]  = (st < NST && e > 0) ? e / 2 : 0;
        ha[k] = (st < NST && e > 0) ? e % 2 : 0;
        t[((st*PW + k)*3 + 0)*8 +: 8] = 8'(h[k]);
        t[((st*PW + k)*3 + 1)*8 +: 8] = 8'(f[k]);
        t[((st*PW + k)*3 + 2)*8 +: 8] = 8'(ha[k]);
      end
      for (int k = 0; k < PW; k++) begin
        cin_k  = (k > 0) ? f[k-1] + ha[k-1] : 0;
        h[k] = h[k] - 2 * f[k] - ha[k] + cin_k;
      end
    end
    return t;
  endfunction

  localparam logic [TW-1:0] TAB = schedule();

  // kind 0: height of column c entering stage s, 1: full adders, 2: half adders
  function automatic int sched(int kind, int s, int c);
    return int'(TAB[((s*PW + c)*3 + kind)*8 +: 8]);
  endfunction

  // pp[c][k]: bit k of column c of the partial-product array. Each stage s
  // reads g_st[s-1].ob (or pp) as ib and drives its own output columns ob.
  wire [N-1:0] pp [PW];

  // partial products
  for (genvar c = 0; c < PW; c++) begin : g_pp
    for (genvar k = 0; k < N; k++) begin : g_k
      // row j = k + max(0, c-N+1), column c takes a[c-j] & b[j]
      localparam int J = k + ((c >= N) ? c - N + 1 : 0);
      if (k < sched(0, 0, c)) begin : g_bit
        assign pp[c][k] = a[c-J] & b[J];
      end else begin : g_zero
        assign pp[c][k] = 1'b0;
      end
    end
  end

  // reduction stages
  for (genvar s = 0; s < NST; s++) begin : g_st
    wire [N-1:0] ib [PW];
    wire [N-1:0] ob [PW];
    if (s == 0) begin : g_in0
      assign ib = pp;
    end else begin : g_in
      assign ib = g_st[s-1].ob;
    end
    for (genvar c = 0; c < PW; c++) begin : g_col
      localparam int H   = sched(0, s, c);
      localparam int F   = sched(1, s, c);
      localparam int A   = sched(2, s, c);
      localparam int FL  = (c > 0) ? sched(1, s, c - 1) : 0;  // carries in
      localparam int AL  = (c > 0) ? sched(2, s, c - 1) : 0;
      localparam int P   = H - 3 * F - 2 * A;                  // bits passed on
      localparam int CB  = F + A + P;                           // first carry slot
      localparam int HN  = CB + FL + AL;                        // height after
      localparam int CBU = (c + 1 < PW) ? sched(0, s, c + 1) - 2 * sched(1, s, c + 1) - sched(2, s, c + 1) : 0;
      for (genvar i = 0; i < F; i++) begin : g_fa
        wire co;
        full_adder u_fa (.a(ib[c][3*i]), .b(ib[c][3*i+1]), .ci(ib[c][3*i+2]),
                         .s(ob[c][i]), .co(co));
        if (c + 1 < PW) begin : g_c
          assign ob[c+1][CBU+i] = co;
        end
      end
      for (genvar i = 0; i < A; i++) begin : g_ha
        assign ob[c][F+i] = ib[c][3*F+2*i] ^ ib[c][3*F+2*i+1];
        if (c + 1 < PW) begin : g_c
          assign ob[c+1][CBU+F+i] = ib[c][3*F+2*i] & ib[c][3*F+2*i+1];
        end
      end
      for (genvar i = 0; i < P; i++) begin : g_pass
        assign ob[c][F+A+i] = ib[c][3*F+2*A+i];
      end
      for (genvar i = HN; i < N; i++) begin : g_zero
        assign ob[c][i] = 1'b0;
      end
    end
  end

  // final carry-propagate adder on the two remaining rows
  logic [PW-1:0] row0, row1;
  for (genvar c = 0; c < PW; c++) begin : g_rows
    assign row0[c] = g_st[NST-1].ob[c][0];
    assign row1[c] = g_st[NST-1].ob[c][1];
  end

  logic unused_co;
  ripple_adder #(.W(PW)) u_rca (.a(row0), .b(row1), .ci(1'b0), .s(p), .co(unused_co));

endmodule
