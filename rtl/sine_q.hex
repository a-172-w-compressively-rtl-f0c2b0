006
013
01f
02c
039
045
052
05e
06b
077
084
090
09d
0a9
0b6
0c2
0cf
0db
0e8
0f4
101
10d
11a
126
133
13f
14b
158
164
171
17d
189
196
1a2
1ae
1ba
1c7
1d3
1df
1eb
1f7
204
210
21c
228
234
240
24c
258
264
270
27c
288
294
2a0
2ac
2b8
2c3
2cf
2db
2e7
2f2
2fe
30a
315
321
32c
338
343
34f
35a
366
371
37c
387
393
39e
3a9
3b4
3bf
3ca
3d6
3e1
3eb
3f6
401
40c
417
422
42c
437
442
44c
457
462
46c
476
481
48b
496
4a0
4aa
4b4
4be
4c8
4d2
4dc
4e6
4f0
4fa
504
50e
517
521
52b
534
53e
547
551
55a
563
56d
576
57f
588
591
59a
5a3
5ac
5b5
5bd
5c6
5cf
5d7
5e0
5e9
5f1
5f9
602
60a
612
61a
622
62a
632
63a
642
64a
652
659
661
668
670
677
67f
686
68d
694
69b
6a3
6a9
6b0
6b7
6be
6c5
6cb
6d2
6d9
6df
6e5
6ec
6f2
6f8
6fe
704
70a
710
716
71c
722
727
72d
732
738
73d
742
748
74d
752
757
75c
761
766
76a
76f
774
778
77d
781
785
789
78e
792
796
79a
79e
7a1
7a5
7a9
7ac
7b0
7b3
7b7
7ba
7bd
7c0
7c3
7c6
7c9
7cc
7cf
7d1
7d4
7d6
7d9
7db
7de
7e0
7e2
7e4
7e6
7e8
7ea
7ec
7ed
7ef
7f0
7f2
7f3
7f5
7f6
7f7
7f8
7f9
7fa
7fb
7fc
7fc
7fd
7fd
7fe
7fe
7ff
7ff
7ff
7ff
