// Stage 5 sequencer: address timer and the J-K toggle that swaps the weight
// memories.
//
// Each neuron owns two weight memories. A J-K flip-flop with J = K tied to
// the "derivative ready" pulse of stage 4 toggles once per training
// iteration; its output q says which memory of each pair is read (q = 0:
// memory A read, memory B written; q = 1: the other way round). The address
// counter doubles as the timer of the whole pass: it walks the full memory,
// first half (weights w) then second half (weights w + h), one address per
// clock. After the last address the sequencer waits until stage 4 reports the
// derivative; the flip-flop then toggles and, unless stage 4 also says stop,
// the next iteration starts at address 0 with the memories' roles exchanged.
//
// The design is deliberately flag-and-counter logic rather than a coded state
// machine. Holding q and the run/wait flags in flip-flops and restarting at
// address 0 are the design's own choices; only the toggle-per-iteration
// behaviour and the counter-as-timer come from the architecture.
//
// Timing: start (ignored while busy) makes issue high from the next clock for
// exactly 2**AW clocks, with addr counting 0 .. 2**AW-1. der_valid is
// expected only while waiting.
//
// The assertion below is disabled during reset; lint reports that use of
// rst_n as a synchronous one (SYNCASYNCNET). It is not part of the circuit.
module swap_ctrl #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          der_valid,  // stage 4: derivative of this iteration ready
  input  logic          stop,       // stage 4: last iteration (valid with der_valid)
  output logic          busy,
  output logic          waiting,
  output logic          q,          // J-K flip-flop: which memory of a pair is read
  output logic          issue,      // addr is a valid read address this clock
  output logic [AW-1:0] addr
);

  logic run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= 1'b0;
      run     <= 1'b0;
      waiting <= 1'b0;
      addr    <= '0;
    end else begin
      if (start && !run && !waiting) begin
        run  <= 1'b1;
        addr <= '0;
      end
      if (run) begin
        addr <= addr + 1'b1;
        if (addr == '1) begin
          run     <= 1'b0;
          waiting <= 1'b1;
        end
      end
      if (der_valid) begin
        q <= ~q;                       // J = K = 1: toggle
        if (waiting) begin
          waiting <= 1'b0;
          if (!stop) begin
            run  <= 1'b1;
            addr <= '0;
          end
        end
      end
    end
  end

  assign busy  = run | waiting;
  assign issue = run;

  a_der_while_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    der_valid |-> waiting)
    else $error("derivative arrived while the memories were still being read");

endmodule
