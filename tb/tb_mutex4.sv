// tb_mutex4: self-checking test of mutex4.
// Random request patterns, where a requester keeps its request until it has
// held the grant for a random time: at most one grant, a grant only to a
// requester, a held grant never moves while its request stays, an idle
// element grants in the same cycle, no requester is overtaken by more than
// two requests raised after its own (the fairness bound of the three-stage
// mutex tree with fair two-input mutexes), and none waits through more than
// five grants in all (up to two others ahead of its stage-1 partner, the
// partner, then its stage-2 and stage-3 partners once each).
module tb_mutex4;
  logic       clk = 0, rst_n = 0;
  logic [3:0] req, grant;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  mutex4 dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hold_left [4];
  int overtaken [4];
  int max_overtaken = 0;
  int later [4];               // grants to requests raised after this one
  int max_later = 0;
  longint raised_at [4];
  longint now = 0;
  logic [3:0] prev_grant;
  logic [3:0] just_released = '0;   // a released request stays low for a clock

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // idle element grants a lone request in the same cycle
    req = 4'b0100; #1;
    check(grant == 4'b0100, "lone request granted at once");
    @(negedge clk);
    req = 4'b0110; #1;
    check(grant == 4'b0100, "held grant stays while requested");
    @(negedge clk);
    req = 4'b0010; #1;
    check(grant == 4'b0010, "release hands over in the same cycle");
    @(negedge clk);
    req = '0;
    @(negedge clk);

    for (int i = 0; i < 4; i++) begin
      hold_left[i] = 0; overtaken[i] = 0; later[i] = 0; raised_at[i] = 0;
    end
    prev_grant = '0;
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < 4; i++)
        if (!req[i] && !just_released[i] && $urandom_range(0, 3) == 0) begin
          req[i] = 1; hold_left[i] = $urandom_range(1, 4); raised_at[i] = now;
        end
      #1;
      check($onehot0(grant), "at most one grant");
      check((grant & ~req) == '0, "grant only to a requester");
      check(!(|(prev_grant & req)) || grant == prev_grant, "held grant does not move");
      check(req == '0 || grant != '0, "some request is granted");
      @(posedge clk);
      // bookkeeping of fairness: a new grant to j overtakes every waiting i
      if (grant != '0 && grant != prev_grant)
        for (int i = 0; i < 4; i++)
          if (req[i] && !grant[i]) begin
            overtaken[i]++;
            if (overtaken[i] > max_overtaken) max_overtaken = overtaken[i];
            for (int j = 0; j < 4; j++)
              if (grant[j] && raised_at[j] > raised_at[i]) begin
                later[i]++;
                if (later[i] > max_later) max_later = later[i];
              end
          end
      now++;
      prev_grant = grant;
      @(negedge clk);
      just_released = '0;
      for (int i = 0; i < 4; i++)
        if (prev_grant[i]) begin
          overtaken[i] = 0;
          later[i] = 0;
          hold_left[i]--;
          if (hold_left[i] == 0) begin req[i] = 0; just_released[i] = 1; end
        end
      if (!(|(prev_grant & req))) prev_grant = '0;
    end
    check(max_overtaken <= 5, $sformatf("a request was passed over %0d times", max_overtaken));
    check(max_later <= 2, $sformatf("a request was overtaken by %0d later ones", max_later));
    $display("mutex4: worst wait %0d grants to others, %0d of them to later requests",
             max_overtaken, max_later);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
