// vp_long_acc: the long accumulator, an NSEG x 2M-bit two's-complement fixed
// point register (64 x 64 = 4096 bits for M = 32) into which significand words
// and partial products are added without rounding.
//
// How it works. The accumulator is a segment RAM plus a 2-bit flag per segment
// saying whether the segment holds all zeros, all ones or neither. Segment 0
// is the most significant; bit positions are counted from its top bit (position
// 0, the sign) downwards. An add request gives a W-bit value (W = 2M) and the
// position of its most significant bit. The shifter splits the value over two
// segments j = pos / W and j+1, which are updated in two cycles with the carry
// (or, for a subtraction, the borrow) of the first passed into the second. A
// carry out of segment j is resolved in one more cycle: a priority search over
// the flags finds the nearest more significant segment that is not all ones
// (for a borrow: not all zeros), the flags of the segments in between are
// toggled to all zeros (all ones) without rewriting their RAM words, and 1 is
// added to (subtracted from) that segment. On every read a flag of all zeros
// or all ones returns that constant instead of the RAM word, so a stale word
// is never seen. Clearing sets every flag to all zeros in one cycle.
//
// Readout. From the flags the unit finds the sign, the lowest non-zero
// segment and the leading one of the magnitude. rd_mag0/rd_mag1 return
// segments of the magnitude |ACC|: for a negative value the bits above the
// lowest non-zero segment are inverted and that segment is negated, which is
// the two's complement done while reading. The controller normalises,
// rounds (by adding one unit in the last place here) and reads the result out.
//
// Timing: add_req is accepted when busy is low. One cycle updates each
// segment touched (one or two) and one more resolves a carry or borrow; done
// pulses in the cycle after that, so 3 cycles after a two-segment request
// without carry (4 with one, 1 when the value falls wholly outside). Bits that fall below the last segment set
// `lost` (used as a sticky bit); a value placed above position 0 sets `ovf`.
//
// From the document: segment count and width, the three-state flags, the
// toggling of flags between carry generation and resolution, and reading
// constants for flagged segments. This design's choices: the two's-complement
// representation, on-the-fly negation at readout, two combinational read
// ports, and the lost/ovf indications.
module vp_long_acc
  import vpiac_pkg::*;
#(
  parameter int unsigned M    = 32,
  parameter int unsigned NSEG = 64,
  localparam int unsigned W   = 2 * M,
  localparam int unsigned SB  = $clog2(NSEG),
  localparam int unsigned PB  = $clog2(NSEG * W) + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  // add interface
  input  logic                add_req,
  input  logic [W-1:0]        add_val,
  input  logic signed [31:0]  add_pos,
  input  logic                add_sub,
  output logic                busy,
  output logic                done,
  // magnitude read ports (index NSEG and above read as zero)
  input  logic [SB:0]         rd_idx0,
  output logic [W-1:0]        rd_mag0,
  input  logic [SB:0]         rd_idx1,
  output logic [W-1:0]        rd_mag1,
  // status
  output logic                neg,
  output logic                zero,
  output logic [PB-1:0]       lead_pos,
  output logic [SB-1:0]       low_seg,
  output logic                lost,
  output logic                ovf
);
  typedef enum logic [1:0] {S_IDLE, S_LO, S_HI, S_CARRY} st_e;

  logic [W-1:0] ram [NSEG];
  la_flag_e     flag [NSEG];
  st_e          st;
  logic [SB:0]  j_q;
  logic [W-1:0] hi_q, lo_q;
  logic         sub_q, cp_q;

  function automatic la_flag_e flag_of(input logic [W-1:0] v);
    if (v == '0)      return F_ZEROS;
    else if (&v)      return F_ONES;
    else              return F_NEITHER;
  endfunction

  function automatic logic [W-1:0] rdval(input int unsigned i);
    if (i >= NSEG)                return '0;
    else if (flag[i] == F_ZEROS)  return '0;
    else if (flag[i] == F_ONES)   return '1;
    else                          return ram[i];
  endfunction

  // ---------------- request alignment ----------------
  logic [SB:0]          j_req;
  logic [$clog2(W)-1:0] off_req;
  logic [W-1:0]         hi_req, lo_req;
  logic [$clog2(W+1)-1:0] sh_hi, sh_lo;

  assign j_req   = 32'(add_pos[31:$clog2(W)]) >= 32'(NSEG + 1) ? (SB+1)'(NSEG + 1)
                                                       : (SB+1)'(add_pos[31:$clog2(W)]);
  assign off_req = add_pos[$clog2(W)-1:0];
  assign sh_hi   = ($clog2(W+1))'(off_req);
  assign sh_lo   = ($clog2(W+1))'(W) - ($clog2(W+1))'(off_req);

  vp_shifter #(.W(W)) u_sh_hi (.din(add_val), .amt(sh_hi), .dir(1'b1), .dout(hi_req));
  vp_shifter #(.W(W)) u_sh_lo (.din(add_val), .amt(sh_lo), .dir(1'b0), .dout(lo_req));

  // ---------------- shared segment adder ----------------
  logic [SB:0]  a_idx;
  logic [W-1:0] a_in, b_in, s_out;
  logic         c_in, c_out, cp_out;

  // carry resolution target: nearest more significant segment that stops it
  logic [SB:0]  k_idx;
  logic         k_found;
  always_comb begin
    k_idx   = '0;
    k_found = 1'b0;
    for (int i = 0; i < NSEG; i++) begin
      if (i < int'(j_q) && flag[i] != (sub_q ? F_ZEROS : F_ONES)) begin
        k_idx   = (SB+1)'(i);
        k_found = 1'b1;
      end
    end
  end

  always_comb begin
    unique case (st)
      S_LO:    begin a_idx = j_q + 1'b1; b_in = lo_q; c_in = sub_q;                 end
      S_HI:    begin a_idx = j_q;        b_in = hi_q; c_in = sub_q ? ~cp_q : cp_q;  end
      default: begin a_idx = k_idx;      b_in = '0;   c_in = ~sub_q;                end
    endcase
    a_in = rdval(int'(a_idx));
  end

  vp_adder #(.W(W)) u_add (.a(a_in), .b(b_in), .cin(c_in), .sub(sub_q), .s(s_out), .cout(c_out));
  assign cp_out = sub_q ? ~c_out : c_out;   // carry (or borrow) to pass on

  // ---------------- sequencing ----------------
  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      done  <= 1'b0;
      lost  <= 1'b0;
      ovf   <= 1'b0;
      j_q   <= '0;
      hi_q  <= '0;
      lo_q  <= '0;
      sub_q <= 1'b0;
      cp_q  <= 1'b0;
      for (int i = 0; i < NSEG; i++) flag[i] <= F_ZEROS;
    end else begin
      done <= 1'b0;
      if (clr) begin
        for (int i = 0; i < NSEG; i++) flag[i] <= F_ZEROS;
        lost <= 1'b0;
        ovf  <= 1'b0;
        st   <= S_IDLE;
      end else begin
        unique case (st)
          S_IDLE: if (add_req) begin
            sub_q <= add_sub;
            cp_q  <= 1'b0;
            hi_q  <= hi_req;
            lo_q  <= lo_req;
            j_q   <= j_req;
            if (add_pos < 0) begin
              if (add_val != '0) ovf <= 1'b1;
              done <= 1'b1;
            end else if (j_req >= (SB+1)'(NSEG)) begin
              if (add_val != '0) lost <= 1'b1;
              done <= 1'b1;
            end else if (j_req + 1'b1 >= (SB+1)'(NSEG) || lo_req == '0) begin
              if (lo_req != '0) lost <= 1'b1;
              st <= S_HI;
            end else begin
              st <= S_LO;
            end
          end
          S_LO: begin
            ram[a_idx[SB-1:0]]  <= s_out;
            flag[a_idx[SB-1:0]] <= flag_of(s_out);
            cp_q <= cp_out;
            st   <= S_HI;
          end
          S_HI: begin
            ram[a_idx[SB-1:0]]  <= s_out;
            flag[a_idx[SB-1:0]] <= flag_of(s_out);
            if (cp_out && j_q != '0) begin
              st <= S_CARRY;
            end else begin
              st   <= S_IDLE;
              done <= 1'b1;
            end
          end
          default: begin  // S_CARRY
            for (int i = 0; i < NSEG; i++) begin
              if (i < int'(j_q) && (!k_found || i > int'(k_idx)))
                flag[i] <= sub_q ? F_ONES : F_ZEROS;
            end
            if (k_found) begin
              ram[k_idx[SB-1:0]]  <= s_out;
              flag[k_idx[SB-1:0]] <= flag_of(s_out);
            end
            st   <= S_IDLE;
            done <= 1'b1;
          end
        endcase
      end
    end
  end

  // ---------------- readout ----------------
  logic [SB-1:0] first_nz, first_n1;
  logic          any_nz, any_n1;
  logic [SB-1:0] lead_seg;
  logic [W-1:0]  lead_mag;
  logic [$clog2(W)-1:0] lz;

  always_comb begin
    first_nz = '0; first_n1 = '0; low_seg = '0;
    any_nz = 1'b0; any_n1 = 1'b0;
    for (int i = NSEG - 1; i >= 0; i--) begin
      if (flag[i] != F_ZEROS) begin first_nz = SB'(i); any_nz = 1'b1; end
      if (flag[i] != F_ONES)  begin first_n1 = SB'(i); any_n1 = 1'b1; end
    end
    for (int i = 0; i < NSEG; i++)
      if (flag[i] != F_ZEROS) low_seg = SB'(i);
  end

  assign zero = ~any_nz;
  assign neg  = rdval(0)[W-1];

  function automatic logic [W-1:0] mag(input int unsigned i);
    if (zero || i >= NSEG)          return '0;
    else if (!neg)                  return rdval(i);
    else if (i < int'(low_seg))     return ~rdval(i);
    else if (i == int'(low_seg))    return -rdval(i);
    else                            return '0;
  endfunction

  always_comb begin
    if (!neg)                               lead_seg = first_nz;
    else if (any_n1 && first_n1 < low_seg)  lead_seg = first_n1;
    else                                    lead_seg = low_seg;
    lead_mag = mag(int'(lead_seg));
    lz = '0;
    for (int b = 0; b < W; b++)
      if (lead_mag[b]) lz = ($clog2(W))'(W - 1 - b);
  end

  assign lead_pos = PB'(lead_seg) * PB'(W) + PB'(lz);
  assign rd_mag0  = mag(int'(rd_idx0));
  assign rd_mag1  = mag(int'(rd_idx1));
endmodule
