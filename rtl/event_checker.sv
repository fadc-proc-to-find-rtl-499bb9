// event_checker: on-board data control of the inputs.
//
// 1. Channel event number: every input counts the APV25 headers it receives
//    (apv_header strobe). At each check strobe the count of every input is
//    compared with the system event number; a difference sets evnum_err.
//    The count is also copied to chan_event, which stays fixed until the next
//    check, so the input headers of a block carry the count of their event
//    even when the headers of the next event already arrive. Likewise the
//    last correction values of each input are copied to hdr_corr1/hdr_corr2
//    at check, for the input headers.
// 2. Missing input: an input that received no APV25 header since the
//    previous check is flagged missing.
// 3. Common-mode corrections: for the first and second correction of each
//    input a signed balance counts +1 for a positive and -1 for a negative
//    value (corr_valid strobe). Both balances should stay near zero.
// Interface: per-input strobes and values, check with sys_event (lower 7 bits
// compared; the header counts from reset, so the first event is number 1),
// per-input results. chan_event, evnum_err and missing are updated at check
// and held; a header arriving in the check clock counts for the next check.
// The counter widths, the comparison at the check strobe and the balance
// counters are this design's choices.
module event_checker #(
  parameter int unsigned N_IN = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              apv_header [N_IN],
  input  logic              corr_valid [N_IN],
  input  logic signed [8:0] corr1      [N_IN],
  input  logic signed [6:0] corr2      [N_IN],
  input  logic              check,
  input  logic [7:0]        sys_event,
  output logic [6:0]        chan_event [N_IN],
  output logic [N_IN-1:0]   evnum_err,
  output logic [N_IN-1:0]   missing,
  output logic [8:0]        hdr_corr1  [N_IN],
  output logic [6:0]        hdr_corr2  [N_IN],
  output logic signed [15:0] bal1      [N_IN],
  output logic signed [15:0] bal2      [N_IN]
);
  logic [N_IN-1:0] seen;
  logic [6:0]      cnt [N_IN];
  logic [8:0]      last1 [N_IN];
  logic [6:0]      last2 [N_IN];

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt[i]        <= '0;
        last1[i]      <= '0;
        last2[i]      <= '0;
        hdr_corr1[i]  <= '0;
        hdr_corr2[i]  <= '0;
        chan_event[i] <= '0;
        seen[i]       <= 1'b0;
        evnum_err[i]  <= 1'b0;
        missing[i]    <= 1'b0;
        bal1[i]       <= '0;
        bal2[i]       <= '0;
      end else begin
        if (apv_header[i]) cnt[i] <= cnt[i] + 1'b1;
        if (check) begin
          chan_event[i] <= cnt[i];
          hdr_corr1[i]  <= last1[i];
          hdr_corr2[i]  <= last2[i];
          evnum_err[i]  <= (cnt[i] != sys_event[6:0]);
          missing[i]   <= !seen[i];
          seen[i]      <= apv_header[i];
        end else if (apv_header[i]) begin
          seen[i] <= 1'b1;
        end
        if (corr_valid[i]) begin
          last1[i] <= corr1[i];
          last2[i] <= corr2[i];
          if (corr1[i] > 0)      bal1[i] <= bal1[i] + 16'sd1;
          else if (corr1[i] < 0) bal1[i] <= bal1[i] - 16'sd1;
          if (corr2[i] > 0)      bal2[i] <= bal2[i] + 16'sd1;
          else if (corr2[i] < 0) bal2[i] <= bal2[i] - 16'sd1;
        end
      end
    end
  end
endmodule
