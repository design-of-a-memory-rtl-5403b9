40000000
40000019
40000032
4000004b
40000065
4000007e
3fff0097
3fff00b0
3fff00c9
3ffe00e2
3ffe00fb
3ffe0114
3ffd012e
3ffd0147
3ffc0160
3ffc0179
3ffb0192
3ffa01ab
3ffa01c4
3ff901dd
3ff801f7
3ff70210
3ff70229
3ff60242
3ff5025b
3ff40274
3ff3028d
3ff202a6
3ff102c0
3ff002d9
3fef02f2
3fed030b
3fec0324
3feb033d
3fea0356
3fe8036f
3fe70388
3fe603a1
3fe403bb
3fe303d4
3fe103ed
3fe00406
3fde041f
3fdc0438
3fdb0451
3fd9046a
3fd70483
3fd5049c
3fd404b5
3fd204ce
3fd004e7
3fce0500
3fcc051a
3fca0533
3fc8054c
3fc60565
3fc4057e
3fc10597
3fbf05b0
3fbd05c9
3fbb05e2
3fb805fb
3fb60614
3fb4062d
3fb10646
3faf065f
3fac0678
3faa0691
3fa706aa
3fa406c3
3fa206dc
3f9f06f5
3f9c070e
3f990727
3f970740
3f940759
3f910772
3f8e078b
3f8b07a4
3f8807bd
3f8507d6
3f8207ef
3f7f0807
3f7b0820
3f780839
3f750852
3f72086b
3f6e0884
3f6b089d
3f6808b6
3f6408cf
3f6108e8
3f5d0901
3f5a0919
3f560932
3f52094b
3f4f0964
3f4b097d
3f470996
3f4309af
3f4009c7
3f3c09e0
3f3809f9
3f340a12
3f300a2b
3f2c0a44
3f280a5c
3f240a75
3f200a8e
3f1c0aa7
3f170ac0
3f130ad8
3f0f0af1
3f0a0b0a
3f060b23
3f020b3b
3efd0b54
3ef90b6d
3ef40b85
3ef00b9e
3eeb0bb7
3ee70bd0
3ee20be8
3edd0c01
3ed80c1a
3ed40c32
3ecf0c4b
3eca0c64
3ec50c7c
3ec00c95
3ebb0cae
3eb60cc6
3eb10cdf
3eac0cf8
3ea70d10
3ea20d29
3e9d0d41
3e980d5a
3e920d72
3e8d0d8b
3e880da4
3e820dbc
3e7d0dd5
3e770ded
3e720e06
3e6c0e1e
3e670e37
3e610e4f
3e5c0e68
3e560e80
3e500e99
3e4a0eb1
3e450eca
3e3f0ee2
3e390efb
3e330f13
3e2d0f2b
3e270f44
3e210f5c
3e1b0f75
3e150f8d
3e0f0fa5
3e090fbe
3e030fd6
3dfc0fee
3df61007
3df0101f
3de91037
3de31050
3ddd1068
3dd61080
3dd01099
3dc910b1
3dc210c9
3dbc10e1
3db510fa
3daf1112
3da8112a
3da11142
3d9a115a
3d931173
3d8d118b
3d8611a3
3d7f11bb
3d7811d3
3d7111eb
3d6a1204
3d63121c
3d5b1234
3d54124c
3d4d1264
3d46127c
3d3f1294
3d3712ac
3d3012c4
3d2812dc
3d2112f4
3d1a130c
3d121324
3d0b133c
3d031354
3cfb136c
3cf41384
3cec139c
3ce413b4
3cdd13cc
3cd513e4
3ccd13fb
3cc51413
3cbd142b
3cb51443
3cad145b
3ca51473
3c9d148b
3c9514a2
3c8d14ba
3c8514d2
3c7d14ea
3c741501
3c6c1519
3c641531
3c5b1549
3c531560
3c4b1578
3c421590
3c3a15a7
3c3115bf
3c2915d7
3c2015ee
3c171606
3c0f161d
3c061635
3bfd164c
3bf51664
3bec167c
3be31693
3bda16ab
3bd116c2
3bc816da
3bbf16f1
3bb61709
3bad1720
3ba41737
3b9b174f
3b921766
3b88177e
3b7f1795
3b7617ac
3b6d17c4
3b6317db
3b5a17f2
3b50180a
3b471821
3b3e1838
3b34184f
3b2a1867
3b21187e
3b171895
3b0e18ac
3b0418c3
3afa18db
3af018f2
3ae61909
3add1920
3ad31937
3ac9194e
3abf1965
3ab5197c
3aab1993
3aa119aa
3a9719c1
3a8d19d8
3a8219ef
3a781a06
3a6e1a1d
3a641a34
3a591a4b
3a4f1a62
3a451a79
3a3a1a90
3a301aa7
3a251abe
3a1b1ad4
3a101aeb
3a061b02
39fb1b19
39f01b30
39e61b46
39db1b5d
39d01b74
39c51b8a
39bb1ba1
39b01bb8
39a51bce
399a1be5
398f1bfc
39841c12
39791c29
396e1c3f
39631c56
39581c6c
394c1c83
39411c99
39361cb0
392b1cc6
391f1cdd
39141cf3
39091d0a
38fd1d20
38f21d36
38e61d4d
38db1d63
38cf1d79
38c31d90
38b81da6
38ac1dbc
38a11dd3
38951de9
38891dff
387d1e15
38711e2b
38661e42
385a1e58
384e1e6e
38421e84
38361e9a
382a1eb0
381e1ec6
38121edc
38051ef2
37f91f08
37ed1f1e
37e11f34
37d51f4a
37c81f60
37bc1f76
37b01f8c
37a31fa2
37971fb7
378a1fcd
377e1fe3
37711ff9
3765200f
37582024
374b203a
373f2050
37322065
3725207b
37182091
370c20a6
36ff20bc
36f220d1
36e520e7
36d820fd
36cb2112
36be2128
36b1213d
36a42153
36972168
368a217d
367d2193
366f21a8
366221be
365521d3
364821e8
363a21fe
362d2213
36202228
3612223d
36052253
35f72268
35ea227d
35dc2292
35ce22a7
35c122bc
35b322d2
35a522e7
359822fc
358a2311
357c2326
356e233b
35612350
35532365
3545237a
3537238e
352923a3
351b23b8
350d23cd
34ff23e2
34f123f7
34e2240b
34d42420
34c62435
34b8244a
34aa245e
349b2473
348d2488
347f249c
347024b1
346224c5
345324da
344524ef
34362503
34282518
3419252c
340b2541
33fc2555
33ed2569
33df257e
33d02592
33c125a6
33b225bb
33a325cf
339525e3
338625f8
3377260c
33682620
33592634
334a2648
333b265c
332c2671
331d2685
330d2699
32fe26ad
32ef26c1
32e026d5
32d026e9
32c126fd
32b22711
32a32724
32932738
3284274c
32742760
32652774
32552788
3246279b
323627af
322727c3
321727d6
320727ea
31f827fe
31e82811
31d82825
31c82838
31b9284c
31a92860
31992873
31892886
3179289a
316928ad
315928c1
314928d4
313928e7
312928fb
3119290e
31092921
30f92935
30e82948
30d8295b
30c8296e
30b82981
30a72994
309729a7
308729bb
307629ce
306629e1
305529f4
30452a07
30342a1a
30242a2c
30132a3f
30022a52
2ff22a65
2fe12a78
2fd02a8b
2fc02a9d
2faf2ab0
2f9e2ac3
2f8d2ad6
2f7d2ae8
2f6c2afb
2f5b2b0d
2f4a2b20
2f392b33
2f282b45
2f172b58
2f062b6a
2ef52b7d
2ee42b8f
2ed32ba1
2ec22bb4
2eb02bc6
2e9f2bd8
2e8e2beb
2e7d2bfd
2e6b2c0f
2e5a2c21
2e492c34
2e372c46
2e262c58
2e152c6a
2e032c7c
2df22c8e
2de02ca0
2dcf2cb2
2dbd2cc4
2dab2cd6
2d9a2ce8
2d882cfa
2d762d0c
2d652d1e
2d532d2f
2d412d41
