// tb_bmnoc_ptpcm_arb: self-checking test of the priority-controlled arbiter.
//
// Two instances see the same stimulus, one with the priority control on and
// one plain round robin. Part 1 reproduces the transmission-permission example
// of the method with five ports (numbered 0..4 here): port 1 is sending a
// packet when its downstream buffer fills; ports 2 and 3 get the link while it
// is blocked; when the buffer drains, the priority-controlled arbiter goes
// straight back to port 1 while round robin moves on to port 4. Port 1 then
// keeps the link until its tail, after which round robin resumes. Part 2
// drives random requests and checks every grant against a reference model of
// both arbiters written here.
module tb_bmnoc_ptpcm_arb;

  localparam int N = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;

  logic [N-1:0] req, ready, mid, tail;
  logic [N-1:0] gnt_p, gnt_r, prio_p, prio_r;

  bmnoc_ptpcm_arb #(.N(N), .PTPCM(1'b1)) u_p (.clk, .rst_n, .req, .ready, .mid, .tail, .gnt(gnt_p), .prio(prio_p));
  bmnoc_ptpcm_arb #(.N(N), .PTPCM(1'b0)) u_r (.clk, .rst_n, .req, .ready, .mid, .tail, .gnt(gnt_r), .prio(prio_r));

  // reference models
  int ref_ptr_p, ref_ptr_r;
  bit [N-1:0] ref_prio;
  int last_p, last_r;   // grants of the cycle the last step() checked

  function automatic bit [N-1:0] rr(bit [N-1:0] pool, int ptr);
    for (int i = 0; i < N; i++) if (pool[(ptr + i) % N]) return N'(1) << ((ptr + i) % N);
    return '0;
  endfunction

  function automatic int idx(bit [N-1:0] g);
    for (int i = 0; i < N; i++) if (g[i]) return i;
    return -1;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  // compare with the models, then advance them
  task automatic step();
    bit [N-1:0] el, exp_p, exp_r;
    #1;
    el    = req & ready;
    exp_p = (|(el & ref_prio)) ? rr(el & ref_prio, ref_ptr_p) : rr(el, ref_ptr_p);
    exp_r = rr(el, ref_ptr_r);
    check("ptpcm grant", int'(gnt_p), int'(exp_p));
    check("rr grant",    int'(gnt_r), int'(exp_r));
    check("rr flags",    int'(prio_r), 0);
    last_p = idx(gnt_p);
    last_r = idx(gnt_r);
    @(posedge clk);
    if (exp_p != 0) ref_ptr_p = (idx(exp_p) + 1) % N;
    if (exp_r != 0) ref_ptr_r = (idx(exp_r) + 1) % N;
    ref_prio = (ref_prio | (req & ~ready & mid)) & ~(exp_p & tail);
    #1;
  endtask

  int got_p [$];
  int got_r [$];

  initial begin
    rst_n = 1'b0; req = '0; ready = '0; mid = '0; tail = '0;
    ref_ptr_p = 0; ref_ptr_r = 0; ref_prio = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- part 1: the blocking example
    // port 1 alone sends a head flit and then a payload flit
    req = 5'b00010; ready = 5'b11111; mid = 5'b00000; step();
    check("p1 head ptpcm", last_p, 1);
    mid = 5'b00010; step();
    // ports 2,3 start requesting; port 1's downstream buffer is full
    req = 5'b01110; ready = 5'b11101;
    for (int c = 0; c < 4; c++) begin
      step(); got_p.push_back(last_p); got_r.push_back(last_r);
    end
    check("p1 flagged when blocked", int'(prio_p[1]), 1);
    // port 4 starts requesting as the buffer drains
    req = 5'b11110; ready = 5'b11111; mid = 5'b11110;
    step(); got_p.push_back(last_p); got_r.push_back(last_r);
    check("ptpcm returns to blocked port", got_p[$], 1);
    check("round robin moves on", got_r[$], 4);
    step(); check("ptpcm keeps blocked port", last_p, 1);
    tail = 5'b00010;
    step(); check("ptpcm sends tail", last_p, 1);
    check("flag cleared at tail", int'(prio_p[1]), 0);
    tail = '0; req = 5'b11100; mid = 5'b11100;
    step(); check("round robin resumes", last_p, 2);

    // ---- part 2: random stimulus against the models
    for (int c = 0; c < 3000; c++) begin
      req   = N'($urandom);
      ready = N'($urandom) | N'($urandom);
      mid   = N'($urandom);
      tail  = N'($urandom) & N'($urandom);
      step();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
