// light_pattern: next-state determination of the LightBox light sequences.
//
// The user selects one of 100 sequences, numbered 00-99 (pnum in BCD). For
// the selected sequence this block gives, combinationally:
//   lights    the eight lights for the current step (bit 7 = leftmost light)
//   cue       which audio event advances it (lightbox_pkg::cue_e)
//   len       number of steps before the step counter wraps to 0
//   rest      the step waits for a band-5 hit (explode sequences only)
//   rnd_next  / hist_next  new random pattern / random history, taken when
//             the sequence advances (random sequences only)
//
// Sequences 00-49 ("base" b) are generated by rule rather than tabulated:
//   00        lights = bands (direct)
//   01-04     a symmetric pair moving out (01), in (02), in and out (03), in
//             and out pausing at each end (04); step on band-5 rises
//   05-09     explode: from a rest pattern, a band-5 hit starts a run of
//             slow-clock steps growing from the centre (05, 06), filling from
//             the left (07, 08) or from the right (08 second half, 09)
//   10-19     chase: a seed pattern rotated one place right per band-5 rise
//             (seeds 80 88 C0 CC E0 EE F0 F8 FC FE hex)
//   20-23     random: 1, 2 or 3 random lights, or a random aligned pair
//   24        a random half lit while band 5 is high, dark while low
//   25, 26    a random light per band-5 rise, kept for 2 or 3 rises
//   27, 28    1 or 2 random adjacent pairs (wrapping), on rises of bands 3..1
//   29        random groups of three adjacent lights, on slow-clock ticks
//   30        all lights follow band 5; 31 all toggle on each band-5 rise
//   32        alternate halves lit while band 5 is high
//   33        bands reordered 7,5,3,1,0,2,4,6; 34/35 all follow band 2/3
//   36        alternating 01010101 / 10101010 on band-5 rises
//   37-49     multi-paced chase: at step t (1..8) light (p*t mod 8) is on for
//             each pace p of the set (37: 1-3, 38: 1-2, 39..43: 1..4 to
//             1..8); 37-43 step on band 5, 44-49 repeat 38-43 on band 2
// Sequences 50-99 are N-50 with the lights inverted, except 60-69, which are
// the chases 10-19 running left instead of right.
// The sequence families, their seeds, cues and the pace rule are read from
// the original design; the exact explode shapes and the rule-based
// generation are this design's.
module light_pattern
  import lightbox_pkg::*;
(
  input  logic [7:0]        pnum,      // {tens, ones}, BCD
  input  logic [STEP_W-1:0] step,
  input  logic [7:0]        rnd,       // stored random pattern
  input  logic [8:0]        hist,      // {h3, h2, h1} random light history
  input  logic [8:0]        r,         // fresh random bits
  input  logic [7:0]        ch,        // synchronised band bits
  output logic [7:0]        lights,
  output cue_e              cue,
  output logic [5:0]        len,
  output logic              rest,
  output logic [7:0]        rnd_next,
  output logic [8:0]        hist_next
);
  // ---- pattern helpers ----
  function automatic logic [7:0] onehot(input logic [2:0] p);
    return 8'b1 << p;
  endfunction
  function automatic logic [7:0] rotl(input logic [7:0] x, input logic [2:0] n);
    return 8'((x << n) | (x >> (4'd8 - {1'b0, n})));
  endfunction
  function automatic logic [7:0] rotr(input logic [7:0] x, input logic [2:0] n);
    return 8'((x >> n) | (x << (4'd8 - {1'b0, n})));
  endfunction
  // symmetric pair, i = 0 centre .. 3 outermost
  function automatic logic [7:0] pair_out(input logic [1:0] i);
    return (8'h08 >> i) | (8'h10 << i);
  endfunction
  // centred block of 2*w lights, w = 0..4
  function automatic logic [7:0] block_c(input logic [2:0] w);
    logic [7:0] m;
    m = '0;
    for (int k = 0; k < 4; k++)
      if (k < int'(w)) m = m | pair_out(2'(k));
    return m;
  endfunction
  // leftmost / rightmost k lights, k = 0..8
  function automatic logic [7:0] left_k(input logic [3:0] k);
    return ~(8'hFF >> k);
  endfunction
  function automatic logic [7:0] right_k(input logic [3:0] k);
    return ~(8'hFF << k);
  endfunction
  function automatic logic [7:0] chase_seed(input logic [3:0] i);
    unique case (i)
      4'd0: return 8'h80;  4'd1: return 8'h88;  4'd2: return 8'hC0;
      4'd3: return 8'hCC;  4'd4: return 8'hE0;  4'd5: return 8'hEE;
      4'd6: return 8'hF0;  4'd7: return 8'hF8;  4'd8: return 8'hFC;
      default: return 8'hFE;
    endcase
  endfunction
  function automatic logic [7:0] paced(input logic [3:0] maxp, input logic [2:0] s);
    logic [7:0] m;
    logic [6:0] prod;
    m = '0;
    for (int p = 1; p <= 8; p++) begin
      prod = 7'(p) * (7'(s) + 7'd1);
      if (p <= int'(maxp)) m[prod[2:0]] = 1'b1;
    end
    return m;
  endfunction

  // ---- decode the number ----
  logic [6:0] n, b;
  logic       hi, inv, rev, bad;
  logic [7:0] base_lights;
  logic [4:0] s;

  assign n   = 7'(pnum[7:4]) * 7'd10 + 7'(pnum[3:0]);
  assign hi  = (n >= 7'd50);
  assign b   = hi ? n - 7'd50 : n;
  assign rev = hi && (b >= 7'd10) && (b <= 7'd19);
  assign bad = (pnum[7:4] > 4'd9) || (pnum[3:0] > 4'd9);
  assign inv = hi && !rev && !bad;
  assign s   = step;

  always_comb begin
    base_lights = '0;
    cue         = CUE_RISE5;
    len         = 6'd1;
    rest        = 1'b0;
    rnd_next    = rnd;
    hist_next   = hist;
    if (bad) begin
      cue = CUE_DIRECT;          // not a valid number: lights stay dark
    end else if (b == 7'd0) begin
      cue = CUE_DIRECT;
      base_lights = ch;
    end else if (b <= 7'd4) begin
      unique case (b)
        7'd1: begin len = 6'd4; base_lights = pair_out(2'(s)); end
        7'd2: begin len = 6'd4; base_lights = pair_out(2'(3 - s)); end
        7'd3: begin
          len = 6'd6;  // outermost -> centre -> back
          base_lights = pair_out((s <= 5'd3) ? 2'(3 - s) : 2'(s - 5'd3));
        end
        default: begin
          len = 6'd8;  // like 03, each end shown twice
          base_lights = pair_out((s <= 5'd3) ? 2'(3 - s) : 2'(s - 5'd4));
        end
      endcase
    end else if (b <= 7'd9) begin
      cue = CUE_TIMED;
      unique case (b)
        7'd5: begin
          len  = 6'd7;  rest = (s == 0);
          base_lights = block_c((s <= 5'd3) ? 3'(s + 1) : 3'(8 - s));
        end
        7'd6: begin
          len  = 6'd9;  rest = (s == 0);
          base_lights = block_c((s <= 5'd4) ? 3'(s) : 3'(9 - s));
        end
        7'd7: begin
          len  = 6'd12; rest = (s == 0);
          base_lights = (s <= 5'd7) ? left_k(4'(s + 1)) : block_c(3'(11 - s));
        end
        7'd8: begin
          len  = 6'd32; rest = (s == 0) || (s == 5'd16);
          if      (s <= 5'd8)  base_lights = left_k(4'(s));
          else if (s <= 5'd15) base_lights = left_k(4'(16 - s));
          else if (s <= 5'd24) base_lights = right_k(4'(s - 16));
          else                 base_lights = right_k(4'(32 - s));
        end
        default: begin
          len  = 6'd14; rest = (s == 0);
          base_lights = (s <= 5'd7) ? right_k(4'(s + 1)) : right_k(4'(15 - s));
        end
      endcase
    end else if (b <= 7'd19) begin
      len = 6'd8;
      base_lights = rev ? rotl(chase_seed(4'(b - 10)), 3'(s))
                        : rotr(chase_seed(4'(b - 10)), 3'(s));
    end else if (b <= 7'd29) begin
      base_lights = rnd;
      unique case (b)
        7'd20: rnd_next = onehot(r[2:0]);
        7'd21: rnd_next = onehot(r[2:0]) | onehot(r[5:3]);
        7'd22: rnd_next = onehot(r[2:0]) | onehot(r[5:3]) | onehot(r[8:6]);
        7'd23: rnd_next = 8'b11 << {r[1:0], 1'b0};
        7'd24: begin
          cue = CUE_BOTH5; len = 6'd2;
          rnd_next    = r[0] ? 8'hF0 : 8'h0F;
          base_lights = s[0] ? rnd : 8'h00;
        end
        7'd25, 7'd26: begin
          hist_next   = {hist[5:0], r[2:0]};
          base_lights = onehot(hist[2:0]) | onehot(hist[5:3]);
          if (b == 7'd26) base_lights = base_lights | onehot(hist[8:6]);
        end
        7'd27: begin cue = CUE_RISE321; rnd_next = rotl(8'b11, r[2:0]); end
        7'd28: begin cue = CUE_RISE321; rnd_next = rotl(8'b11, r[2:0]) | rotl(8'b11, r[5:3]); end
        default: begin
          cue = CUE_SLOW;
          rnd_next = rotl(8'b111, r[2:0]) | rotl(8'b111, r[3:1]) | rotl(8'b111, r[4:2]);
        end
      endcase
    end else if (b <= 7'd36) begin
      unique case (b)
        7'd30: begin cue = CUE_BOTH5; len = 6'd2; base_lights = {8{s[0]}}; end
        7'd31: begin len = 6'd2; base_lights = {8{s[0]}}; end
        7'd32: begin
          cue = CUE_BOTH5; len = 6'd4;
          base_lights = !s[0] ? 8'h00 : (s[1] ? 8'hF0 : 8'h0F);
        end
        7'd33: begin
          cue = CUE_DIRECT;
          base_lights = {ch[7], ch[5], ch[3], ch[1], ch[0], ch[2], ch[4], ch[6]};
        end
        7'd34: begin cue = CUE_DIRECT; base_lights = {8{ch[2]}}; end
        7'd35: begin cue = CUE_DIRECT; base_lights = {8{ch[3]}}; end
        default: begin len = 6'd2; base_lights = s[0] ? 8'hAA : 8'h55; end
      endcase
    end else begin
      len = 6'd8;
      if (b == 7'd37)      base_lights = paced(4'd3, 3'(s));
      else if (b <= 7'd43) base_lights = paced((b == 7'd38) ? 4'd2 : 4'(b - 7'd35), 3'(s));
      else begin
        cue = CUE_RISE2;
        base_lights = paced((b == 7'd44) ? 4'd2 : 4'(b - 7'd41), 3'(s));
      end
    end
  end

  assign lights = inv ? ~base_lights : base_lights;
endmodule
