// aetr_flag_builder: builds the merged AETR row groups from a retention
// profile and writes their flags.
//
// The profile arrives as a stream of one retention bit per base row group,
// bank 0 first, group 0 first within a bank (prof_short = 1 marks a group
// with a weak cell, to be refreshed every 64 ms). Adjacent base groups with
// the same retention bit are collected into a run of at most 32 groups; a run
// never crosses a bank boundary. A run is then cut, largest piece first, into
// groups whose sizes are in the allowed list 1, 2, 3, 4, 8, 16, 24, 32, and
// for each piece the flag {retention bit, size code} is written at its first
// base group. A run of 11 thus becomes 8 + 3, a run of 7 becomes 4 + 3.
// The merge rule (same retention bit, merged size must be an allowed size)
// is the document's; cutting runs largest piece first is this design's
// reading of its bottom-up merge, and it reproduces the grouping of the
// document's worked example (8, 3, 1, 4).
//
// Interface: start begins a build; prof_valid/prof_ready/prof_short is a
// valid-ready stream of N_BANKS*GROUPS bits; wr_* is the flag-store write
// port; busy is high while building and done is high after the last flag is
// written, until the next start.
// Timing: one profile bit is taken per cycle while scanning; each finished
// run stalls the stream for one cycle per group written.
module aetr_flag_builder
  import aetr_pkg::*;
#(
  parameter int unsigned N_BANKS = 8,
  parameter int unsigned GROUPS  = 32768,
  localparam int unsigned BW  = (N_BANKS > 1) ? $clog2(N_BANKS) : 1,
  localparam int unsigned BCW = $clog2(N_BANKS + 1),
  localparam int unsigned AW  = $clog2(GROUPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          prof_valid,
  output logic          prof_ready,
  input  logic          prof_short,
  output logic          busy,
  output logic          done,
  output logic          wr_en,
  output logic [BW-1:0] wr_bank,
  output logic [AW-1:0] wr_group,
  output flag_t         wr_flag
);

  typedef enum logic [1:0] {B_IDLE, B_SCAN, B_FLUSH, B_DONE} bstate_t;
  bstate_t state;

  // position of the next incoming profile bit
  logic [BCW-1:0]    in_bank;
  logic [AW-1:0]     in_group;
  // run being collected
  logic              run_bit;
  logic [SIZE_W-1:0] run_len;      // 0 = no run
  logic [AW-1:0]     run_start;
  logic [BW-1:0]     run_bank;
  // run being written out
  logic              fl_bit;
  logic [SIZE_W-1:0] fl_len;
  logic [AW-1:0]     fl_start;
  logic [BW-1:0]     fl_bank;
  logic              fl_more;      // flush the collected run too, afterwards

  logic              accept, last_in_bank, extend;
  logic [SIZE_CODE_W-1:0] piece_code;
  logic [SIZE_W-1:0] piece_size;
  logic              piece_ret_unused;

  assign prof_ready   = (state == B_SCAN);
  assign accept       = prof_valid && prof_ready;
  assign last_in_bank = (in_group == AW'(GROUPS - 1));
  assign extend       = (run_len != '0) && (prof_short == run_bit) &&
                        (run_len < SIZE_W'(MAX_GROUP));

  assign piece_code = code_for_run(fl_len);
  aetr_flag_decode u_size (
    .flag      ('{ret_short: fl_bit, size_code: piece_code}),
    .ret_short (piece_ret_unused),
    .size      (piece_size)
  );

  assign wr_en    = (state == B_FLUSH);
  assign wr_bank  = fl_bank;
  assign wr_group = fl_start;
  assign wr_flag  = '{ret_short: fl_bit, size_code: piece_code};
  assign busy     = (state == B_SCAN) || (state == B_FLUSH);
  assign done     = (state == B_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= B_IDLE;
      in_bank   <= '0;
      in_group  <= '0;
      run_bit   <= 1'b0;
      run_len   <= '0;
      run_start <= '0;
      run_bank  <= '0;
      fl_bit    <= 1'b0;
      fl_len    <= '0;
      fl_start  <= '0;
      fl_bank   <= '0;
      fl_more   <= 1'b0;
    end else begin
      unique case (state)
        B_IDLE, B_DONE: begin
          if (start) begin
            state    <= B_SCAN;
            in_bank  <= '0;
            in_group <= '0;
            run_len  <= '0;
            fl_more  <= 1'b0;
          end
        end

        B_SCAN: begin
          if (accept) begin
            // advance the input position
            if (last_in_bank) begin
              in_group <= '0;
              in_bank  <= in_bank + 1'b1;
            end else begin
              in_group <= in_group + 1'b1;
            end

            if (extend) begin
              if (last_in_bank) begin
                // bank ends: write out the run including this bit
                fl_bit   <= run_bit;
                fl_len   <= run_len + 1'b1;
                fl_start <= run_start;
                fl_bank  <= run_bank;
                fl_more  <= 1'b0;
                run_len  <= '0;
                state    <= B_FLUSH;
              end else begin
                run_len <= run_len + 1'b1;
              end
            end else begin
              // this bit opens a new run
              run_bit   <= prof_short;
              run_len   <= SIZE_W'(1);
              run_start <= in_group;
              run_bank  <= BW'(in_bank);
              if (run_len != '0) begin
                fl_bit   <= run_bit;
                fl_len   <= run_len;
                fl_start <= run_start;
                fl_bank  <= run_bank;
                fl_more  <= last_in_bank;
                state    <= B_FLUSH;
              end else if (last_in_bank) begin
                // one-group bank: the new run is complete at once
                fl_bit   <= prof_short;
                fl_len   <= SIZE_W'(1);
                fl_start <= in_group;
                fl_bank  <= BW'(in_bank);
                fl_more  <= 1'b0;
                run_len  <= '0;
                state    <= B_FLUSH;
              end
            end
          end
        end

        B_FLUSH: begin
          // one group written per cycle (wr_en is high in this state)
          if (fl_len == piece_size) begin
            if (fl_more) begin
              fl_bit   <= run_bit;
              fl_len   <= run_len;
              fl_start <= run_start;
              fl_bank  <= run_bank;
              fl_more  <= 1'b0;
              run_len  <= '0;
            end else if (in_bank == BCW'(N_BANKS)) begin
              state <= B_DONE;
            end else begin
              state <= B_SCAN;
            end
          end else begin
            fl_len   <= fl_len - piece_size;
            fl_start <= fl_start + AW'(piece_size);
          end
        end

        default: state <= B_IDLE;
      endcase
    end
  end

endmodule
