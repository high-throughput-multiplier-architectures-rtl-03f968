// Testbench of fwd_ctrl (N = 16, S = 5), Arch1 and Arch2.
//
// A cycle-level reference keeps the acceptance cycle and the result of every
// issued multiply; the result appears on res_low exactly S cycles after
// acceptance (random garbage otherwise). Random multiplies with random
// distances are offered. For each operand the reference derives the
// producer's position p (cycles since its acceptance): p >= S gives the full
// value, p < S gives "pending, offset p". Arch1 must hold a multiply whose
// two operands are both pending and move a lone pending OP1 into B; Arch2
// must pass both operands through and never hold. All outputs, including
// the event pulses and the dependency type, are compared every cycle.
module tb_fwd_ctrl;
  import ifwd_pkg::*;
  localparam int unsigned N = 16, S = 5, PB = 3, DB = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] done = 2'b00;

  for (genvar x = 0; x < 2; x++) begin : g_arch
    localparam int unsigned ARCH = x + 1;
    logic          in_valid, in_ready, fire, a_pend, b_pend, ev_stall, ev_swap, ev_window;
    logic [N-1:0]  op1, op2, res_low, a, b;
    logic [DB-1:0] dist1, dist2;
    logic [PB-1:0] a_off, b_off;
    dep_type_e     dtype;
    longint        iss_cyc [$];
    logic [N-1:0]  iss_val [$];
    int            n_stall, n_swap, n_win, n_pend;

    fwd_ctrl #(.ARCH(ARCH), .N(N), .S(S), .PB(PB), .DB(DB)) u_dut (.*);

    initial begin
      longint cyc;
      n_stall = 0; n_swap = 0; n_win = 0; n_pend = 0;
      in_valid = 0; op1 = '0; op2 = '0; dist1 = '0; dist2 = '0; res_low = '0;
      wait (rst_n);
      cyc = 0;
      for (int t = 0; t < 4000; t++) begin
        logic [N-1:0]  v [2];
        logic          p [2], w [2];
        logic [PB-1:0] o [2];
        int            d [2];
        logic          stall, swap;
        @(negedge clk);
        in_valid = ($urandom % 10) < 8;
        op1 = 16'($urandom); op2 = 16'($urandom);
        d[0] = ($urandom % 2 != 0) ? int'($urandom % S) : 0;
        d[1] = ($urandom % 2 != 0) ? int'($urandom % S) : 0;
        for (int i = 0; i < 2; i++) if (d[i] > iss_cyc.size()) d[i] = 0;
        dist1 = DB'(d[0]); dist2 = DB'(d[1]);
        res_low = 16'($urandom);
        foreach (iss_cyc[j]) if (iss_cyc[j] == cyc - longint'(int'(S))) res_low = iss_val[j];
        // reference
        for (int i = 0; i < 2; i++) begin
          v[i] = (i == 0) ? op1 : op2; p[i] = 0; o[i] = '0; w[i] = 0;
          if (d[i] != 0) begin
            longint pos;
            int idx;
            idx = iss_cyc.size() - d[i];
            pos = cyc - iss_cyc[idx];
            if (pos >= longint'(int'(S))) begin v[i] = iss_val[idx]; w[i] = 1; end
            else begin v[i] = '0; p[i] = 1; o[i] = PB'(pos); end
          end
        end
        stall = (ARCH == 1) && p[0] && p[1];
        swap  = (ARCH == 1) && p[0] && !p[1];
        #1;
        checks++;
        if ({in_ready, fire, ev_stall, ev_swap, ev_window, dtype}
            !== {!stall, in_valid && !stall, in_valid && stall, in_valid && !stall && swap,
                 in_valid && !stall && (w[0] || w[1]), dep_type(d[0] != 0, d[1] != 0)}) begin
          failures++;
          if (failures < 10) $display("FAIL arch%0d cycle %0d: control %b%b%b%b%b", ARCH, cyc, in_ready, fire, ev_stall, ev_swap, ev_window);
        end
        if (in_valid && !stall) begin
          int ia, ib;
          ia = swap ? 1 : 0; ib = swap ? 0 : 1;
          checks++;
          if ({a, b, a_pend, b_pend} !== {v[ia], v[ib], p[ia], p[ib]}
              || (p[ia] && a_off != o[ia]) || (p[ib] && b_off != o[ib])) begin
            failures++;
            if (failures < 10) $display("FAIL arch%0d cycle %0d: operands %h %h %b%b %0d %0d vs %h %h %b%b %0d %0d",
                                        ARCH, cyc, a, b, a_pend, b_pend, a_off, b_off, v[ia], v[ib], p[ia], p[ib], o[ia], o[ib]);
          end
          if (p[0] || p[1]) n_pend++;
          if (w[0] || w[1]) n_win++;
          if (swap) n_swap++;
        end
        if (in_valid && stall) n_stall++;
        @(posedge clk);
        if (in_valid && !stall) begin
          iss_cyc.push_back(cyc);
          iss_val.push_back(16'($urandom));
        end
        cyc++;
      end
      checks++;
      if (n_pend == 0 || n_win == 0 || (ARCH == 1 && (n_stall == 0 || n_swap == 0))) begin
        failures++;
        $display("FAIL arch%0d: a mechanism never occurred", ARCH);
      end
      $display("arch%0d: pending %0d, window %0d, swap %0d, stall %0d", ARCH, n_pend, n_win, n_swap, n_stall);
      done[x] = 1'b1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    wait (done == 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
