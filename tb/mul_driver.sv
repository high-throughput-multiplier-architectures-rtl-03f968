// Stimulus generator and reference model for one forwarding multiplier unit.
//
// Drives the unit's instruction port and checks its result port. A program
// starts with seven directed multiplies:
//   0: R0 = A x B          3: R3 = A4 x R0 (distance 3)
//   1: R1 = A2 x R0 (D1)   4: X  = A x B
//   2: R2 = A3 x R1 (D1)   5: Y  = X x C   (type 10, D1)
//                          6: Z  = X x Y   (type 11, D2 and D1)
// Multiplies 0..3 form the four-instruction chain that, with all forwarding
// paths, issues back to back (last result S+3 cycles after the first issue).
// Multiply 6 issues one cycle after 5 in Arch2, and S-1 cycles after it in
// Arch1, where it waits for X to complete. After that come NUM-7 random
// multiplies: DEP_PCT percent of them dependent (type 01, 10 or 11 with
// distances 1..S-1), with issue gaps when GAP_PCT > 0. A dependent operand's
// port value is random and must be ignored. Every product is compared with
// the signed product worked out here, and must appear exactly S cycles after
// it was accepted. The event pulses of the unit are counted; every mechanism
// the architecture has must occur, and Arch2 must never stall or swap.
// All drive and sample happens on the rising edge with non-blocking updates.
module mul_driver #(
  parameter int unsigned ARCH    = 2,
  parameter int unsigned N       = 16,
  parameter int unsigned S       = 5,
  parameter int unsigned NUM     = 400,
  parameter int unsigned DEP_PCT = 60,
  parameter int unsigned GAP_PCT = 15,
  parameter bit          CHECK_EVENTS = 1'b1,
  localparam int unsigned DB = $clog2(S)
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic           in_valid,
  input  logic           in_ready,
  output logic [N-1:0]   op1,
  output logic [N-1:0]   op2,
  output logic [DB-1:0]  dist1,
  output logic [DB-1:0]  dist2,
  input  logic           out_valid,
  input  logic [2*N-1:0] out_prod,
  input  logic [4:0]     events,      // {stall, swap, window, whole, slice}
  output logic           done,
  output int             checks,
  output int             failures,
  output longint         cycles       // cycles from first issue to last result
);

  // expected issue distance of the directed type-11 multiply from its predecessor
  localparam int     T11_GAP_I = (ARCH == 1) ? ((S > 2) ? int'(S) - 1 : int'(S)) : 1;
  localparam longint T11_GAP = longint'(T11_GAP_I);

  logic [2*N-1:0] hist [$];      // reference product of every accepted multiply
  logic [2*N-1:0] exp_q [$];     // products still expected
  longint         iss_q [$];     // acceptance cycle of those
  longint         iss_cyc [$];   // acceptance cycle of every multiply
  logic [2*N-1:0] cur_exp;
  longint         cyc;
  longint         first_issue;
  int unsigned    gen, outs;
  int             ev_cnt [5];

  function automatic logic [N-1:0] rand_op();
    logic [N-1:0] v;
    case ($urandom % 8)
      0: v = {1'b1, {(N-1){1'b0}}};          // most negative
      1: v = '1;                             // -1
      2: v = {1'b0, {(N-1){1'b1}}};          // most positive
      default: for (int i = 0; i < int'(N); i++) v[i] = 1'($urandom);
    endcase
    return v;
  endfunction

  function automatic logic [2*N-1:0] smul(input logic [N-1:0] x, input logic [N-1:0] y);
    logic signed [2*N-1:0] xs, ys;
    xs = {{N{x[N-1]}}, x};
    ys = {{N{y[N-1]}}, y};
    return xs * ys;
  endfunction

  // Build multiply number gen (0-based) and its expected product.
  task automatic make_instr(output logic [N-1:0] o1, output logic [N-1:0] o2,
                            output logic [DB-1:0] d1, output logic [DB-1:0] d2,
                            output logic [2*N-1:0] e);
    int unsigned t1, t2;
    logic [N-1:0] v1, v2;
    t1 = 0; t2 = 0;
    case (gen)
      0, 4: ;
      1, 2: t2 = 1;
      3: t2 = 3;
      5: t1 = 1;
      6: begin t1 = 2; t2 = 1; end
      default: if (int'($urandom % 100) < int'(DEP_PCT)) begin
        case ($urandom % 3)
          0: t2 = 1 + $urandom % (S - 1);
          1: t1 = 1 + $urandom % (S - 1);
          default: begin t1 = 1 + $urandom % (S - 1); t2 = 1 + $urandom % (S - 1); end
        endcase
      end
    endcase
    if (gen < 7) begin   // directed distances are limited to S-1
      if (t1 > S - 1) t1 = S - 1;
      if (t2 > S - 1) t2 = S - 1;
    end
    o1 = rand_op();
    o2 = rand_op();
    v1 = (t1 != 0) ? hist[gen-t1][N-1:0] : o1;
    v2 = (t2 != 0) ? hist[gen-t2][N-1:0] : o2;
    d1 = DB'(t1);
    d2 = DB'(t2);
    e  = smul(v1, v2);
  endtask

  always @(posedge clk) begin
    logic [N-1:0]  n1, n2;
    logic [DB-1:0] nd1, nd2;
    logic [2*N-1:0] ne;
    if (!rst_n) begin
      in_valid <= 1'b0;
      done     <= 1'b0;
      checks   <= 0;
      failures <= 0;
      cyc       = 0;
      gen       = 0;
      outs      = 0;
      first_issue = -1;
      foreach (ev_cnt[i]) ev_cnt[i] = 0;
    end else begin
      cyc++;
      for (int i = 0; i < 5; i++) if (events[i]) ev_cnt[i]++;
      // accepted multiply
      if (in_valid && in_ready) begin
        hist.push_back(cur_exp);
        exp_q.push_back(cur_exp);
        iss_q.push_back(cyc);
        iss_cyc.push_back(cyc);
        if (first_issue < 0) first_issue = cyc;
        gen++;
      end
      // result
      if (out_valid) begin
        longint ic;
        logic [2*N-1:0] e;
        if (exp_q.size() == 0) begin
          failures <= failures + 1;
          $display("FAIL arch%0d: unexpected result", ARCH);
        end else begin
          e  = exp_q.pop_front();
          ic = iss_q.pop_front();
          checks <= checks + 2;
          if (out_prod !== e) begin
            failures <= failures + 1;
            $display("FAIL arch%0d N=%0d S=%0d: result %0d got %h expected %h",
                     ARCH, N, S, outs, out_prod, e);
          end
          if (cyc - ic != longint'(int'(S))) begin
            failures <= failures + 1;
            $display("FAIL arch%0d: latency %0d, expected %0d", ARCH, cyc - ic, S);
          end
          outs++;
          if (outs == NUM) begin
            int f;
            f = 0;
            cycles = cyc - first_issue;
            // directed timing: chain of four issues back to back
            if (iss_cyc[3] - iss_cyc[0] != 3) begin
              f++; $display("FAIL arch%0d: forwarding chain took %0d issue cycles", ARCH, iss_cyc[3] - iss_cyc[0]);
            end
            // type 11: Arch2 no bubble, Arch1 waits until X is complete
            if (iss_cyc[6] - iss_cyc[5] != T11_GAP) begin
              f++; $display("FAIL arch%0d: type-11 multiply issued %0d cycles after its predecessor",
                            ARCH, iss_cyc[6] - iss_cyc[5]);
            end
            if (CHECK_EVENTS) begin
              if (ev_cnt[0] == 0) begin f++; $display("FAIL arch%0d: no slice forwarding", ARCH); end
              if (S >= 3 && ev_cnt[1] == 0) begin f++; $display("FAIL arch%0d: no whole-operand forwarding", ARCH); end
              if (ev_cnt[2] == 0) begin f++; $display("FAIL arch%0d: no operand from the window", ARCH); end
              if (ARCH == 1 && ev_cnt[3] == 0) begin f++; $display("FAIL arch1: no operand swap"); end
              if (ARCH == 1 && ev_cnt[4] == 0) begin f++; $display("FAIL arch1: no stall"); end
              if (ARCH == 2 && (ev_cnt[3] != 0 || ev_cnt[4] != 0)) begin f++; $display("FAIL arch2: stall or swap"); end
            end
            $display("arch%0d N=%0d S=%0d dep=%0d%%: %0d multiplies, %0d cycles; events slice=%0d whole=%0d window=%0d swap=%0d stall=%0d",
                     ARCH, N, S, DEP_PCT, NUM, cycles, ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4]);
            checks   <= checks + 2 + 6 + 3;
            failures <= failures + f + ((out_prod !== e) ? 1 : 0) + ((cyc - ic != longint'(int'(S))) ? 1 : 0);
            done     <= 1'b1;
          end
        end
      end
      // next multiply on the port
      if (!in_valid || in_ready) begin
        if (gen < NUM && (gen < 7 || int'($urandom % 100) >= int'(GAP_PCT))) begin
          make_instr(n1, n2, nd1, nd2, ne);
          op1 <= n1; op2 <= n2; dist1 <= nd1; dist2 <= nd2;
          cur_exp  <= ne;
          in_valid <= 1'b1;
        end else begin
          in_valid <= 1'b0;
        end
      end
    end
  end

endmodule
