// tb_vp_long_acc: drives the long accumulator (M = 32: 64 segments of 64
// bits, 4096 bits) with random additions and subtractions of 64-bit values
// at random bit positions, clustered so that carries and borrows run across
// many all-ones / all-zeros segments, and compares after every operation:
//  * every segment of the magnitude read port with a 4096-bit two's-complement
//    model kept here;
//  * sign, zero, leading-one position and lowest non-zero segment;
//  * the lost flag for bits that fall off the bottom;
//  * the latency: done is seen 3 cycles after a request that touches two
//    segments, 2 for one segment, one more with carry resolution.
// It counts carry and borrow resolutions and fails if either never happened.
module tb_vp_long_acc;
  localparam int M = 32, NSEG = 64, W = 64, N = NSEG * W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clr, add_req, add_sub, busy, done, neg, zero, lost, ovf;
  logic [W-1:0] add_val, rd_mag0, rd_mag1;
  logic signed [31:0] add_pos;
  logic [6:0] rd_idx0, rd_idx1;
  logic [12:0] lead_pos;
  logic [5:0] low_seg;

  vp_long_acc #(.M(M), .NSEG(NSEG)) dut (.*);

  logic [N-1:0] model, magm;
  logic exp_lost;
  int checks = 0, failures = 0, n_carry = 0, n_borrow = 0;

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (dut.st == 2'd3) begin
    if (dut.sub_q) n_borrow++; else n_carry++;
  end

  task automatic check_state(string what);
    int lz, ls;
    logic mneg;
    mneg = model[N-1];
    magm = mneg ? -model : model;
    lz = 0;
    for (int b = 0; b < N; b++) if (magm[b]) lz = N - 1 - b;
    ls = 0;
    for (int s = 0; s < NSEG; s++) if (model[N - 1 - s * W -: W] != '0) ls = s;
    checks++;
    if (zero !== (model == '0) || (model != '0 && (neg !== mneg || int'(lead_pos) != lz ||
        int'(low_seg) != ls)) || lost !== exp_lost) begin
      failures++;
      if (failures < 10) $display("FAIL %s status: zero %b neg %b/%b lead %0d/%0d low %0d/%0d lost %b/%b",
        what, zero, neg, mneg, lead_pos, lz, low_seg, ls, lost, exp_lost);
    end
    for (int s = 0; s < NSEG; s += 2) begin
      rd_idx0 = 7'(s); rd_idx1 = 7'(s + 1);
      #1;
      checks++;
      if (rd_mag0 !== magm[N - 1 - s * W -: W] || rd_mag1 !== magm[N - 1 - (s + 1) * W -: W]) begin
        failures++;
        if (failures < 10) $display("FAIL %s seg %0d: %h / %h", what, s, rd_mag0, magm[N - 1 - s * W -: W]);
      end
    end
  endtask

  task automatic do_add(logic [W-1:0] v, int pos, logic sub);
    int c0, lat, elat;
    logic [N+W-1:0] ext;
    c0 = n_carry + n_borrow;
    // request edge, then one cycle per segment updated, one more to resolve a
    // carry, and done is seen the cycle after the last state
    if (pos >= N) elat = 1;
    else if (pos % W == 0 || pos / W == NSEG - 1 || (v << (W - pos % W)) == '0) elat = 2;
    else elat = 3;
    @(negedge clk);
    add_req = 1; add_val = v; add_pos = pos; add_sub = sub;
    @(negedge clk);
    add_req = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    // model: value placed with its MSB at position pos (0 = top bit)
    ext = {v, {N{1'b0}}} >> pos;
    if (ext[W-1:0] != '0) exp_lost = 1;
    if (sub) model = model - ext[N+W-1:W];
    else     model = model + ext[N+W-1:W];
    checks++;
    if (n_carry + n_borrow != c0) elat++;
    if (lat != elat) begin failures++; $display("FAIL latency %0d, expected %0d", lat, elat); end
    check_state("add");
  endtask

  int base;
  initial begin
    clr = 0; add_req = 0; add_val = 0; add_pos = 0; add_sub = 0; rd_idx0 = 0; rd_idx1 = 0;
    model = '0; exp_lost = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_state("reset");
    for (int r = 0; r < 12; r++) begin
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      model = '0; exp_lost = 0;
      check_state("clear");
      base = 64 + $urandom_range(3000);
      for (int t = 0; t < 25; t++) begin
        logic [W-1:0] v;
        int pos;
        v = {$urandom, $urandom};
        if (t % 6 == 0) v = '1;
        pos = base + int'($urandom_range(400)) - 200;
        if (r == 11 && t > 20) pos = N - W + 10 + t;   // falls partly off the bottom
        do_add(v, pos, (t % 3 == 1) || (r % 4 == 3));
      end
    end
    // long carry: build a run of all-ones segments, then carry through it
    @(negedge clk); clr = 1; @(negedge clk); clr = 0; model = '0; exp_lost = 0;
    for (int s = 10; s < 40; s++) do_add('1, s * W, 0);
    do_add(64'd1, 39 * W, 0);
    // and a long borrow back through the all-zeros run
    do_add(64'd1, 39 * W, 1);
    $display("carry resolutions %0d, borrow resolutions %0d", n_carry, n_borrow);
    checks++; if (n_carry == 0 || n_borrow == 0) begin failures++; $display("FAIL no carry/borrow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
