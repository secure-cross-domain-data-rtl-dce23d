// tb_json_pda: self-checking testbench of the JSON push-down automaton.
//
// Feeds directed cases with known verdicts, random valid JSON of nesting
// depth 1 to 15 (the range of the evaluation data), and single-byte
// mutations of those texts. Every verdict is compared with the recursive-
// descent reference checker in json_ref. It also checks the rate: the
// automaton takes one byte per clock, so the verdict is ready one clock
// after the last byte, and nesting one level beyond MAX_DEPTH must raise
// the overflow flag.
module tb_json_pda;
  import json_ref::*;

  localparam int unsigned MAX_DEPTH = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] in_data = '0;
  logic error_o, accept_o, overflow_o;
  logic [$clog2(MAX_DEPTH+1)-1:0] depth_o;

  int checks = 0, failures = 0;
  int n_valid = 0, n_invalid = 0, n_overflow = 0;

  json_pda #(.MAX_DEPTH(MAX_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Feed a text and return the verdict; checks the one-byte-per-clock rate.
  task automatic run(string txt, output bit ok, output bit ovf);
    int start, stop;
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    start = $time;
    for (int i = 0; i < txt.len(); i++) begin
      in_valid = 1'b1;
      in_data  = txt[i];
      @(negedge clk);
    end
    in_valid = 1'b0;
    stop = $time;
    check((stop - start) == 10 * txt.len(), "one byte per clock");
    ok  = accept_o && !error_o;
    ovf = overflow_o;
  endtask

  task automatic expect_verdict(string txt, bit want);
    bit ok, ovf;
    run(txt, ok, ovf);
    check(ok == want, $sformatf("verdict %0d (want %0d) for: %s", ok, want, txt));
    if (want) n_valid++; else n_invalid++;
  endtask

  initial begin
    string t, nest;
    bit ok, ovf, want;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Directed cases with hand-derived verdicts.
    expect_verdict("{\"LabIV8E\": -2006, \"q3\": false, \"1CP\": 724.8507268121102, \"cOPY4K\": \"VwxslZatE\", \"2Mfz6\": 424}", 1);
    expect_verdict("[]", 1);
    expect_verdict("{}", 1);
    expect_verdict("  [1, [2, [3]], {\"a\": null}]  \n", 1);
    expect_verdict("0", 1);
    expect_verdict("-0.5e+10", 1);
    expect_verdict("\"a\\u12fF\\n\"", 1);
    expect_verdict("true", 1);
    expect_verdict("[1,]", 0);
    expect_verdict("{\"a\" 1}", 0);
    expect_verdict("{\"a\":1,}", 0);
    expect_verdict("01", 0);
    expect_verdict("1.", 0);
    expect_verdict("-", 0);
    expect_verdict("1e", 0);
    expect_verdict("[1] 2", 0);
    expect_verdict("{\"a\":1]", 0);
    expect_verdict("[1}", 0);
    expect_verdict("tru", 0);
    expect_verdict("trux", 0);
    expect_verdict("\"\\x\"", 0);
    expect_verdict("\"\\u12g4\"", 0);
    expect_verdict("{1:2}", 0);
    expect_verdict("", 0);
    expect_verdict("[", 0);
    expect_verdict("{\"a\":{\"b\":[true,false,null]}}", 1);

    // Stack limit: MAX_DEPTH levels pass, one more overflows.
    nest = "";
    for (int i = 0; i < MAX_DEPTH; i++) nest = {"[", nest, "]"};
    expect_verdict(nest, 1);
    run({"[", nest, "]"}, ok, ovf);
    check(!ok && ovf, "overflow one level beyond MAX_DEPTH");
    n_overflow += ovf;

    // Random valid texts of depth 1..15 and their mutations.
    for (int i = 0; i < 300; i++) begin
      int d;
      d = (i % 15) + 1;
      t = gen_value(0, d - 1);
      want = ref_valid(t, MAX_DEPTH);
      check(want == (nesting(t) <= MAX_DEPTH), "generator produced valid JSON");
      run(t, ok, ovf);
      check(ok == want, $sformatf("random text verdict %0d want %0d: %s", ok, want, t));
      if (want) n_valid++; else n_invalid++;
      // Mutate one byte.
      if (t.len() > 0) begin
        int k;
        byte m;
        k = $urandom_range(0, t.len() - 1);
        case ($urandom_range(0, 5))
          0: m = "{"; 1: m = "]"; 2: m = ","; 3: m = "\""; 4: m = ":";
          default: m = byte'($urandom_range(32, 126));
        endcase
        t[k] = m;
        want = ref_valid(t, MAX_DEPTH);
        run(t, ok, ovf);
        check(ok == want, $sformatf("mutated text verdict %0d want %0d: %s", ok, want, t));
        if (want) n_valid++; else n_invalid++;
      end
    end

    check(n_valid > 50 && n_invalid > 50 && n_overflow > 0, "both verdicts and overflow exercised");
    $display("valid=%0d invalid=%0d overflow=%0d", n_valid, n_invalid, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
