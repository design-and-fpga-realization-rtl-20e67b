// rev_full_adder_tb: end-to-end self-checking test of the reversible full
// adder at its only configuration.
//
// Phase 1 applies the two vectors shown for the board demonstration,
// (a, b, cin) = 110 (expect sum 0, carry 1) and 100 (expect sum 1, carry 0).
// Phase 2 sweeps all eight input patterns; phase 3 applies 2000 random
// patterns. Every pattern is checked against the integer sum a + b + cin,
// against the garbage outputs (garbage[0] = a, garbage[1] = a ^ b), and by
// recovering (a, b, cin) from the outputs, which must be possible because the
// adder is reversible. The testbench also counts how often each carry
// mechanism occurred: carry generated (a & b), carry propagated
// ((a ^ b) & cin) and carry killed (neither); each must occur at least once.
// Inputs change on the falling edge of a testbench-only clock and are checked
// one time unit later. A watchdog ends the run with a failure after 5000 cycles.
module rev_full_adder_tb;

    logic clk = 1'b0;
    always #5 clk = ~clk;

    int checks   = 0;
    int failures = 0;
    int n_generate  = 0;
    int n_propagate = 0;
    int n_kill      = 0;

    logic       a, b, cin;
    logic       sum, cout;
    logic [1:0] garbage;

    rev_full_adder dut (
        .a(a), .b(b), .cin(cin),
        .sum(sum), .cout(cout), .garbage(garbage)
    );

    task automatic check(input bit cond, input string what);
        checks++;
        if (!cond) begin
            failures++;
            $display("FAIL: %s (abc=%0b%0b%0b sum=%0b cout=%0b g=%0b)",
                     what, a, b, cin, sum, cout, garbage);
        end
    endtask

    task automatic apply(input logic [2:0] abc);
        int total;
        @(negedge clk);
        {a, b, cin} = abc;
        #1;
        total = int'(a) + int'(b) + int'(cin);
        check({cout, sum} == 2'(total), "arithmetic sum");
        check(garbage[0] == a, "garbage[0] = a");
        check(garbage[1] == (a ^ b), "garbage[1] = a ^ b");
        check({garbage[0], garbage[0] ^ garbage[1], sum ^ garbage[1]} == abc,
              "inputs recovered from outputs");
        if (a && b)              n_generate++;
        else if ((a ^ b) && cin) n_propagate++;
        else                     n_kill++;
    endtask

    initial begin
        a = 1'b0; b = 1'b0; cin = 1'b0;

        // Board demonstration vectors
        apply(3'b110);
        check(sum == 1'b0 && cout == 1'b1, "vector 110: sum 0 carry 1");
        apply(3'b100);
        check(sum == 1'b1 && cout == 1'b0, "vector 100: sum 1 carry 0");

        // Exhaustive sweep
        for (int v = 0; v < 8; v++) apply(3'(v));

        // Random patterns
        repeat (2000) apply(3'($urandom_range(7)));

        $display("carry generated=%0d propagated=%0d killed=%0d",
                 n_generate, n_propagate, n_kill);
        check(n_generate  > 0, "carry generate occurred");
        check(n_propagate > 0, "carry propagate occurred");
        check(n_kill      > 0, "carry kill occurred");

        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        repeat (5000) @(posedge clk);
        failures++;
        $display("FAIL: watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

endmodule
